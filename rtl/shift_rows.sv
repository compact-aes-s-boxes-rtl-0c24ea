// shift_rows: AES ShiftRows (inv = 0) or InvShiftRows (inv = 1) on a 128-bit
// state in FIPS-197 byte order (byte 4c+r is row r of column c). Row r is
// rotated left by r bytes for ShiftRows and right by r bytes for
// InvShiftRows. One wiring network with a 2:1 byte multiplexer, shared by
// cipher and decipher. Combinational.
module shift_rows
  import aes_pkg::*;
(
  input  block_t d,
  input  logic   inv,
  output block_t q
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        q[127 - 8*(4*c + r) -: 8] = inv ? d[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8]
                                        : d[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
