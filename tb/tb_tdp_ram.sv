// tb_tdp_ram: random traffic on both ports of the 512x8 true dual-port RAM
// against an array model: one-cycle registered reads, read-first behaviour
// on a writing port, and writes from both ports in the same cycle.
module tb_tdp_ram;
  logic clk = 1'b0;
  logic we_a = 1'b0, we_b = 1'b0;
  logic [8:0] addr_a = '0, addr_b = '0;
  logic [7:0] wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  logic [7:0] model [512];
  logic [7:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  tdp_ram dut (.clk, .we_a, .addr_a, .wdata_a, .rdata_a,
                                         .we_b, .addr_b, .wdata_b, .rdata_b);

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
    // fill every word: port A the even, port B the odd addresses
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we_a = 1'b1; addr_a = 9'(2*i);   wdata_a = 8'($urandom);
      we_b = 1'b1; addr_b = 9'(2*i+1); wdata_b = 8'($urandom);
      model[addr_a] = wdata_a;
      model[addr_b] = wdata_b;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we_a   = 1'($urandom);
      we_b   = 1'($urandom);
      addr_a = 9'($urandom);
      addr_b = 9'($urandom);
      if (addr_b == addr_a) addr_b = addr_a ^ 9'h100;
      wdata_a = 8'($urandom);
      wdata_b = 8'($urandom);
      exp_a = model[addr_a];
      exp_b = model[addr_b];
      if (we_a) model[addr_a] = wdata_a;
      if (we_b) model[addr_b] = wdata_b;
      @(posedge clk);
      #1;
      check(rdata_a == exp_a, $sformatf("port A read %03h", addr_a));
      check(rdata_b == exp_b, $sformatf("port B read %03h", addr_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
