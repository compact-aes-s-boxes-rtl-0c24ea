// tb_sbox_gen: runs the generator, records every write pair in a model of
// the 512-word RAM, and checks that each of the 512 words is written exactly
// once with the reference S-box / inverse S-box value, that the fill takes
// exactly 256 write cycles with 'done' rising right after, that a start
// while busy is ignored, and that a second run gives the same tables.
module tb_sbox_gen;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, we;
  logic [8:0] fwd_addr, inv_addr;
  logic [7:0] fwd_data, inv_data;
  logic [7:0] mem [512];
  int   nwr [512];
  int   checks = 0, failures = 0;
  int   wcycles;

  sbox_gen dut (.clk, .rst_n, .start, .busy, .done, .we,
                .fwd_addr, .fwd_data, .inv_addr, .inv_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (we) begin
    mem[fwd_addr] <= fwd_data;
    mem[inv_addr] <= inv_data;
    nwr[fwd_addr] <= nwr[fwd_addr] + 1;
    nwr[inv_addr] <= nwr[inv_addr] + 1;
    wcycles++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(bit poke_start);
    int cyc;
    for (int i = 0; i < 512; i++) nwr[i] = 0;
    wcycles = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    check(busy && !done, "busy after start");
    while (!done && cyc < 1000) begin
      if (poke_start && cyc == 100) start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    check(cyc == 256, $sformatf("fill takes 256 cycles (%0d)", cyc));
    check(wcycles == 256, $sformatf("256 write cycles (%0d)", wcycles));
    check(!busy && !we, "idle after fill");
    for (int x = 0; x < 256; x++) begin
      check(nwr[x] == 1 && mem[x] == ref_sbox(8'(x)),
            $sformatf("S(%02h): %0d writes, %02h", x, nwr[x], mem[x]));
      check(nwr[256 + ref_sbox(8'(x))] == 1 && mem[256 + ref_sbox(8'(x))] == 8'(x),
            $sformatf("Sinv entry for %02h", x));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !we, "idle after reset");
    run(1'b1);
    repeat (5) @(negedge clk);
    check(done && !busy, "done holds");
    for (int i = 0; i < 512; i++) mem[i] = 8'h00;
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
