// at_bt: the combined affine and basis transformation AT(BT(d)). BT maps an
// element of GF(2^8) mod m'(x) into the AES field (see basis_transform) and
// AT is the AES S-box affine map b_i = c_i ^ c_(i+4) ^ c_(i+5) ^ c_(i+6) ^
// c_(i+7) ^ 63_i. Folding the two 8x8 GF(2) matrices into one gives the XOR
// network below; the constant 63 appears as inversions of bits 6, 5, 1, 0.
// Fed with the inverse x^-1 of an element (in the generator field) it
// therefore outputs the AES S-box value S(BT(x)). Combinational, no clock.
module at_bt
  import aes_pkg::*;
(
  input  byte_t d,
  output byte_t q
);

  assign q[7] =   d[7] ^ d[4] ^ d[3];
  assign q[6] = ~(d[7] ^ d[6] ^ d[4] ^ d[2]);
  assign q[5] = ~(d[7] ^ d[5] ^ d[4] ^ d[3] ^ d[2] ^ d[1]);
  assign q[4] =   d[7] ^ d[6] ^ d[5] ^ d[0];
  assign q[3] =   d[7] ^ d[4] ^ d[0];
  assign q[2] =   d[7] ^ d[6] ^ d[4] ^ d[3] ^ d[0];
  assign q[1] = ~(d[7] ^ d[5] ^ d[4] ^ d[2] ^ d[0]);
  assign q[0] = ~(d[7] ^ d[6] ^ d[5] ^ d[3] ^ d[2] ^ d[1] ^ d[0]);

endmodule
