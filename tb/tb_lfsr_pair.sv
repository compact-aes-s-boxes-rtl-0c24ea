// tb_lfsr_pair: checks that the two LFSRs step alpha^i and alpha^-i of
// GF(2^8)/m'(x): alpha register against a reference power computed by
// shift-and-add multiplication, the product of both registers equal to 01 at
// every step, period 255, and load/hold behaviour.
module tb_lfsr_pair;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [7:0] a, b, ref_a;
  int checks = 0, failures = 0;
  bit seen [256];

  lfsr_pair dut (.clk, .rst_n, .load, .step, .alpha_pow(a), .beta_pow(b));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (a=%02h b=%02h ref=%02h)", what, a, b, ref_a);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    ref_a = 8'h01;
    check(a == 8'h01 && b == 8'h01, "reset value");
    step = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      ref_a = ref_mul(ref_a, 8'h02, 9'h11D);
      check(a == ref_a, "alpha power");
      check(ref_mul(a, b, 9'h11D) == 8'h01, "alpha*beta == 1");
      if (i < 255) begin
        check(!seen[a] && a != 8'h00, "alpha visits each non-zero element once");
        seen[a] = 1'b1;
      end
      if (i == 254) check(a == 8'h01 && b == 8'h01, "period 255");
    end
    // hold
    step = 1'b0;
    ref_a = a;
    repeat (3) @(negedge clk);
    check(a == ref_a, "hold without step");
    // load
    load = 1'b1;
    step = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(a == 8'h01 && b == 8'h01, "load wins over step");
    @(negedge clk);
    check(a == 8'h02 && b == 8'h8E, "first step gives 02 and 8E");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
