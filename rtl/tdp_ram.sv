// tdp_ram: synchronous true dual-port RAM, by default 512 x 8 bits = 4 kbit,
// the size of one FPGA RAM block used to hold an S-box in its lower half and
// the inverse S-box in its upper half. Both ports share one clock; each can
// write or read in every cycle. Reads are registered (read-first: a port that
// writes returns the old word). Writing the same address from both ports in
// one cycle is not allowed (port B wins in simulation). No reset: the
// contents are undefined until written. The 4-kbit size and dual-port use
// follow the source design; read-first behaviour is this design's choice.
module tdp_ram #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] wdata_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [DATA_W-1:0] wdata_b,
  output logic [DATA_W-1:0] rdata_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    rdata_a <= mem[addr_a];
    rdata_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= wdata_a;
    if (we_b) mem[addr_b] <= wdata_b;
  end

endmodule
