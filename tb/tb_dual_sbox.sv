// tb_dual_sbox: writes reference S-box and inverse S-box pairs through the
// initialisation port (forward entry on port A, inverse entry on port B, as
// the generator does), then makes random forward and inverse lookups on both
// ports and checks the results one clock later.
module tb_dual_sbox;
  import aes_ref_pkg::*;

  logic clk = 1'b0, init_we = 1'b0;
  logic [8:0] init_fwd_addr = '0, init_inv_addr = '0;
  logic [7:0] init_fwd_data = '0, init_inv_data = '0;
  logic [7:0] a_a = '0, a_b = '0, q_a, q_b;
  logic inv_a = 1'b0, inv_b = 1'b0;
  logic [7:0] sb [256];
  logic [7:0] isb [256];
  logic [7:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dual_sbox dut (.clk, .init_we, .init_fwd_addr, .init_fwd_data, .init_inv_addr,
                 .init_inv_data, .a_a, .inv_a, .q_a, .a_b, .inv_b, .q_b);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      sb[x] = ref_sbox(8'(x));
      isb[sb[x]] = 8'(x);
    end
    for (int x = 0; x < 256; x++) begin
      @(negedge clk);
      init_we = 1'b1;
      init_fwd_addr = {1'b0, 8'(x)};  init_fwd_data = sb[x];
      init_inv_addr = {1'b1, sb[x]};  init_inv_data = 8'(x);
    end
    @(negedge clk);
    init_we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_a = 8'($urandom); inv_a = 1'($urandom);
      a_b = 8'($urandom); inv_b = 1'($urandom);
      if (i < 256) begin a_a = 8'(i); a_b = 8'(i); inv_a = 1'b0; inv_b = 1'b1; end
      exp_a = inv_a ? isb[a_a] : sb[a_a];
      exp_b = inv_b ? isb[a_b] : sb[a_b];
      @(posedge clk);
      #1;
      check(q_a == exp_a, $sformatf("port A %s(%02h)=%02h", inv_a ? "Sinv" : "S", a_a, q_a));
      check(q_b == exp_b, $sformatf("port B %s(%02h)=%02h", inv_b ? "Sinv" : "S", a_b, q_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
