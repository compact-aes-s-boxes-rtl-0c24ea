// tb_at_bt: exhaustively checks the combined affine + basis transformation
// against the reference affine map applied to the reference basis map, and
// that at_bt fed with d^-1 (in GF(2^8)/m') gives the AES S-box of BT(d).
module tb_at_bt;
  import aes_ref_pkg::*;

  logic [7:0] d, q;
  int checks = 0, failures = 0;

  at_bt dut (.d, .q);

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
    for (int i = 0; i < 256; i++) begin
      d = 8'(i);
      #1;
      check(q == ref_affine(ref_bt(8'(i))), $sformatf("AT_BT(%02h)=%02h", i, q));
    end
    for (int i = 1; i < 256; i++) begin
      d = ref_inv(8'(i), 9'h11D);
      #1;
      check(q == ref_sbox(ref_bt(8'(i))), $sformatf("S-box via inverse, %02h", i));
    end
    d = 8'h00;
    #1;
    check(q == 8'h63, "AT_BT(00) = 63");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
