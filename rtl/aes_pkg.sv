// aes_pkg: types and small GF(2^8) helpers shared by the AES datapath and the
// S-box generator. The AES field is GF(2^8) mod m(x) = x^8+x^4+x^3+x+1 (11B);
// the generator field is GF(2^8) mod m'(x) = x^8+x^4+x^3+x^2+1 (11D), in which
// 02 is primitive. State bytes follow the FIPS-197 order: byte 0 sits in
// bits [127:120], byte index = 4*column + row.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Reduction polynomials without the x^8 term.
  localparam byte_t AES_POLY_LOW = 8'h1B;  // m(x)
  localparam byte_t GEN_POLY_LOW = 8'h1D;  // m'(x)
  // alpha = 02 and beta = alpha^-1 = 8E in the generator field.
  localparam byte_t GEN_BETA     = 8'h8E;
  // Affine constant of the AES S-box.
  localparam byte_t AFFINE_CONST = 8'h63;

  // One address of the 512-entry S-box RAM: bit 8 selects the table.
  typedef logic [8:0] sbox_addr_t;
  localparam logic SBOX_TABLE_FWD = 1'b0;  // S-box at 000-0FF
  localparam logic SBOX_TABLE_INV = 1'b1;  // inverse S-box at 100-1FF

  // Multiplication by 02 in the AES field.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? AES_POLY_LOW : 8'h00);
  endfunction

  // Multiplication by 02^-1 = 8D in the AES field.
  function automatic byte_t xtime_inv(byte_t a);
    return {1'b0, a[7:1]} ^ (a[0] ? 8'h8D : 8'h00);
  endfunction

  // Byte i (FIPS order) of a 128-bit block.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

endpackage
