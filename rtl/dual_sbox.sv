// dual_sbox: two independent dual S-boxes in one 4-kbit true dual-port RAM.
// Port A and port B each look up one byte per clock, in the forward S-box
// (inv = 0, RAM words 000-0FF) or in the inverse S-box (inv = 1, words
// 100-1FF); the result appears on q_a / q_b one clock after the address
// (registered RAM read). While 'init_we' is high both ports are taken over by
// the S-box generator, which writes the forward entry through port A and the
// inverse entry through port B in the same cycle. Which table a lookup uses
// is chosen per port per cycle. Sharing one RAM between two S-boxes follows
// the source design; the init/lookup multiplexing is this design's own.
module dual_sbox
  import aes_pkg::*;
(
  input  logic       clk,
  // initialisation write (from sbox_gen)
  input  logic       init_we,
  input  sbox_addr_t init_fwd_addr,
  input  byte_t      init_fwd_data,
  input  sbox_addr_t init_inv_addr,
  input  byte_t      init_inv_data,
  // lookups
  input  byte_t      a_a,
  input  logic       inv_a,
  output byte_t      q_a,
  input  byte_t      a_b,
  input  logic       inv_b,
  output byte_t      q_b
);

  sbox_addr_t addr_a, addr_b;

  always_comb begin
    addr_a = init_we ? init_fwd_addr : {inv_a, a_a};
    addr_b = init_we ? init_inv_addr : {inv_b, a_b};
  end

  tdp_ram #(.ADDR_W(9), .DATA_W(8)) u_ram (
    .clk     (clk),
    .we_a    (init_we),
    .addr_a  (addr_a),
    .wdata_a (init_fwd_data),
    .rdata_a (q_a),
    .we_b    (init_we),
    .addr_b  (addr_b),
    .wdata_b (init_inv_data),
    .rdata_b (q_b)
  );

endmodule
