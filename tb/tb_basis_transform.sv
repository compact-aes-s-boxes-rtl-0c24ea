// tb_basis_transform: exhaustively checks the basis transformation. Every
// output is compared with a reference map built from powers of 03, and the
// map is checked to be a field isomorphism: BT(a*b mod m') == BT(a)*BT(b) mod
// m for all 65536 pairs, and bijective.
module tb_basis_transform;
  import aes_ref_pkg::*;

  logic [7:0] d, q;
  logic [7:0] tab [256];
  int checks = 0, failures = 0;
  bit seen [256];

  basis_transform dut (.d, .q);

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
      tab[i] = q;
      check(q == ref_bt(8'(i)), $sformatf("BT(%02h)=%02h", i, q));
      check(!seen[q], "bijective");
      seen[q] = 1'b1;
    end
    check(tab[2] == 8'h03, "02 maps to 03");
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check(tab[ref_mul(8'(x), 8'(y), 9'h11D)] == ref_mul(tab[x], tab[y]),
              $sformatf("homomorphism %02h*%02h", x, y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
