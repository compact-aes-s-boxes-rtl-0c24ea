// lfsr_pair: the two 8-bit Galois LFSRs of the S-box generator. Register A
// holds alpha^i and register B holds beta^i = alpha^-i, both elements of
// GF(2^8) mod m'(x) = x^8+x^4+x^3+x^2+1, where alpha = 02 is primitive and
// beta = 8E. Each step multiplies A by 02 (shift left, fold back 1D when
// bit 7 falls out) and B by 8E (shift right, fold back 8E when bit 0 falls
// out), so the two registers always hold a multiplicatively inverse pair and
// together run through all 255 non-zero elements with period 255.
// Interface: 'load' sets both registers to 01 (alpha^0, beta^0); 'step'
// advances both by one power. Both act on the rising clock edge; load wins.
// Asynchronous active-low reset also loads 01. The field, alpha and beta come
// from the source design; the load/step/reset controls are this design's.
module lfsr_pair
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  step,
  output byte_t alpha_pow,   // alpha^i
  output byte_t beta_pow     // beta^i = (alpha^i)^-1
);

  byte_t a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= 8'h01;
      b_q <= 8'h01;
    end else if (load) begin
      a_q <= 8'h01;
      b_q <= 8'h01;
    end else if (step) begin
      // x * a mod m'(x)
      a_q <= {a_q[6:0], 1'b0} ^ (a_q[7] ? GEN_POLY_LOW : 8'h00);
      // x^-1 * b mod m'(x)
      b_q <= {1'b0, b_q[7:1]} ^ (b_q[0] ? GEN_BETA : 8'h00);
    end
  end

  assign alpha_pow = a_q;
  assign beta_pow  = b_q;

endmodule
