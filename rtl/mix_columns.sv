// mix_columns: AES MixColumns, shared with InvMixColumns through its serial
// decomposition. InvMixColumns = MixColumns o P, where P multiplies every
// column by the polynomial {04}x^2 + {05}: p_i = 05*a_i ^ 04*a_(i+2). With
// inv = 0 the state passes straight into the MixColumns network; with inv = 1
// it first goes through P. Only one MixColumns network exists. Combinational.
// Sharing MixColumns with InvMixColumns follows the source design; the choice
// of this particular decomposition is this design's.
module mix_columns
  import aes_pkg::*;
(
  input  block_t d,
  input  logic   inv,
  output block_t q
);

  byte_t a [16];
  byte_t p [16];

  always_comb begin
    for (int i = 0; i < 16; i++) a[i] = get_byte(d, i);
    // P stage: 05*a_i ^ 04*a_(i+2) within each column
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        byte_t x, y, y4;
        x  = a[4*c + r];
        y  = a[4*c + (r + 2) % 4];
        y4 = xtime(xtime(x ^ y));      // 04*(x ^ y)
        p[4*c + r] = inv ? (y4 ^ x) : x;
      end
    end
    // MixColumns: b_r = 02*p_r ^ 03*p_(r+1) ^ p_(r+2) ^ p_(r+3)
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        byte_t p0, p1, p2, p3;
        p0 = p[4*c + r];
        p1 = p[4*c + (r + 1) % 4];
        p2 = p[4*c + (r + 2) % 4];
        p3 = p[4*c + (r + 3) % 4];
        q[127 - 8*(4*c + r) -: 8] = xtime(p0 ^ p1) ^ p1 ^ p2 ^ p3;
      end
    end
  end

endmodule
