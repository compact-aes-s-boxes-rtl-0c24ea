// tb_shift_rows: the FIPS-197 example state plus random states through
// ShiftRows and InvShiftRows, compared with the reference permutation, and
// a round trip through both directions.
module tb_shift_rows;
  import aes_ref_pkg::*;

  logic [127:0] d, q, d2, q2;
  logic inv;
  int checks = 0, failures = 0;

  shift_rows dut  (.d(d),  .inv(inv),  .q(q));
  shift_rows dut2 (.d(q),  .inv(~inv), .q(q2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // byte index as value: ShiftRows gives 00 05 0a 0f 04 09 0e 03 ...
    d = 128'h000102030405060708090a0b0c0d0e0f;
    inv = 1'b0;
    #1;
    check(q == 128'h00050a0f04090e03080d02070c01060b, "ShiftRows of index pattern");
    inv = 1'b1;
    #1;
    check(q == 128'h000d0a0704010e0b0805020f0c090603, "InvShiftRows of index pattern");
    for (int i = 0; i < 2000; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'($urandom);
      #1;
      check(q == ref_shift(d, inv), "random vs reference");
      check(q2 == d, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
