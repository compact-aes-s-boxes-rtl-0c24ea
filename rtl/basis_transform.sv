// basis_transform: the basis transformation BT that maps an element d of
// GF(2^8) mod m'(x) = x^8+x^4+x^3+x^2+1 onto the isomorphic element of the
// AES field GF(2^8) mod m(x) = x^8+x^4+x^3+x+1. It is the linear map sending
// 02^j of the generator field to 03^j of the AES field (03 is a root of m'(x)
// in the AES field), i.e. the columns of its matrix are 01 03 05 0F 11 33 55
// FF. Purely combinational XOR network, no clock.
module basis_transform
  import aes_pkg::*;
(
  input  byte_t d,
  output byte_t q
);

  assign q[7] = d[7];
  assign q[6] = d[7] ^ d[6];
  assign q[5] = d[7] ^ d[5];
  assign q[4] = d[7] ^ d[6] ^ d[5] ^ d[4];
  assign q[3] = d[7] ^ d[3];
  assign q[2] = d[7] ^ d[6] ^ d[3] ^ d[2];
  assign q[1] = d[7] ^ d[5] ^ d[3] ^ d[1];
  assign q[0] = ^d;

endmodule
