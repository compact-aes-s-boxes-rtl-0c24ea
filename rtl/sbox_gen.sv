// sbox_gen: the LFSR_LUT S-box table generator. An LFSR pair steps alpha^i
// and beta^i = alpha^-i through GF(2^8) mod m'(x); the basis transformation
// turns alpha^i into the AES-field byte x, and the combined affine+basis
// transformation turns beta^i into S(x) = AT(x^-1). Each clock therefore
// yields one (x, S(x)) pair, written as two RAM words at once through the two
// ports of a true dual-port RAM: RAM[{0,x}] = S(x) (forward S-box) and
// RAM[{1,S(x)}] = x (inverse S-box). The 255 non-zero x come from the LFSRs;
// the zero element, which has no power form, is written in a 256th cycle as
// S(00) = 63.
// Interface: a 'start' pulse (ignored while busy) loads both LFSRs with 01;
// from the next cycle 'we' is high for exactly 256 cycles with the two write
// words on fwd_*/inv_*, then 'done' rises and stays high until the next start.
// The LFSR pair and both transformations follow the source design; the
// sequencing, the extra zero-element cycle and the handshake are this
// design's own.
module sbox_gen
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic       we,
  output sbox_addr_t fwd_addr,
  output byte_t      fwd_data,
  output sbox_addr_t inv_addr,
  output byte_t      inv_data
);

  byte_t      alpha_pow, beta_pow;
  byte_t      x_lfsr, s_lfsr, x, s;
  logic [7:0] cnt_q;      // number of pairs already written
  logic       busy_q, done_q;
  logic       last;       // cycle that writes the zero element

  assign last = (cnt_q == 8'd255);

  lfsr_pair u_lfsr (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (start && !busy_q),
    .step      (busy_q),
    .alpha_pow (alpha_pow),
    .beta_pow  (beta_pow)
  );

  basis_transform u_bt  (.d(alpha_pow), .q(x_lfsr));
  at_bt           u_atbt(.d(beta_pow),  .q(s_lfsr));

  always_comb begin
    x = last ? 8'h00        : x_lfsr;
    s = last ? AFFINE_CONST : s_lfsr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done_q <= 1'b0;
      cnt_q  <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1;
        done_q <= 1'b0;
        cnt_q  <= '0;
      end
    end else begin
      cnt_q <= cnt_q + 8'd1;
      if (last) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end
    end
  end

  assign busy     = busy_q;
  assign done     = done_q;
  assign we       = busy_q;
  assign fwd_addr = {SBOX_TABLE_FWD, x};
  assign fwd_data = s;
  assign inv_addr = {SBOX_TABLE_INV, s};
  assign inv_data = x;

endmodule
