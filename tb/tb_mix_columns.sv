// tb_mix_columns: known column vectors (db 13 53 45 -> 8e 4d a1 bc) and
// random states through MixColumns and through the shared InvMixColumns path,
// compared with the reference matrix products {02 03 01 01} and
// {0e 0b 0d 09}; also checks that the inverse path undoes the forward one.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] d, q, q2;
  logic inv;
  int checks = 0, failures = 0;

  mix_columns dut  (.d(d), .inv(inv),  .q(q));
  mix_columns dut2 (.d(q), .inv(1'b1), .q(q2));

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
    d = 128'hdb135345f20a225c01010101c6c6c6c6;
    inv = 1'b0;
    #1;
    check(q == 128'h8e4da1bc9fdc589d01010101c6c6c6c6, "MixColumns known columns");
    check(q2 == d, "InvMixColumns restores known columns");
    inv = 1'b1;
    d = 128'h8e4da1bc9fdc589d01010101c6c6c6c6;
    #1;
    check(q == 128'hdb135345f20a225c01010101c6c6c6c6, "InvMixColumns known columns");
    for (int i = 0; i < 2000; i++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      inv = 1'($urandom);
      #1;
      check(q == ref_mix(d, inv), $sformatf("random inv=%0d", inv));
      if (!inv) check(q2 == d, "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
