// tb_aes_lfsr_lut: end-to-end test of the whole cipher at its only size.
// After reset it times the S-box fill, then runs the FIPS-197 example
// vectors and random blocks in both directions against the reference model,
// checking every result, the 20-clock encrypt and 40-clock decrypt latency,
// and that 'start' is ignored during the fill and while a block is in
// progress. It counts how often each mechanism occurred (S-box fill, encrypt,
// decrypt with key precomputation, back-to-back operations, ignored starts,
// key change between blocks) and fails any that never happened.
module tb_aes_lfsr_lut;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, decrypt = 1'b0;
  logic [127:0] key_in = '0, data_in = '0, data_out;
  logic ready, busy, done;
  int checks = 0, failures = 0;
  int n_fill = 0, n_enc = 0, n_dec = 0, n_b2b = 0, n_ign_init = 0,
      n_ign_busy = 0, n_key_change = 0;
  logic [127:0] last_key = '0;

  aes_lfsr_lut dut (.clk, .rst_n, .start, .decrypt, .key_in, .data_in,
                    .ready, .busy, .done, .data_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // one block; 'poke' issues a stray start in the middle of the operation
  task automatic op(bit dec, logic [127:0] key, logic [127:0] din, bit poke);
    logic [127:0] expect_q;
    int cyc;
    expect_q = dec ? ref_decrypt(key, din) : ref_encrypt(key, din);
    while (!ready) @(negedge clk);
    if (key != last_key) n_key_change++;
    last_key = key;
    start = 1'b1; decrypt = dec; key_in = key; data_in = din;
    @(negedge clk);
    start = 1'b0; key_in = ~key; data_in = ~din; decrypt = ~dec;  // inputs registered
    cyc = 0;   // clock edges since the edge that took 'start'
    check(busy && !ready, "busy after start");
    while (!done && cyc < 200) begin
      if (poke && cyc == 6) begin start = 1'b1; n_ign_busy++; end
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    check(cyc == (dec ? 40 : 20), $sformatf("%s latency %0d", dec ? "decrypt" : "encrypt", cyc));
    check(data_out == expect_q, $sformatf("%s %h -> %h, expected %h",
                                          dec ? "decrypt" : "encrypt", din, data_out, expect_q));
    check(ready, "ready with done");
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [127:0] k, p, c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!ready && cyc < 1000) begin
      if (cyc == 100) begin start = 1'b1; n_ign_init++; end   // ignored
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    check(cyc == 258, $sformatf("S-box fill to ready: %0d clocks", cyc));
    n_fill++;
    check(!done, "no result from the start during the fill");

    // FIPS-197 appendix vectors
    op(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    check(data_out == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS-197 C.1 ciphertext");
    op(1, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    check(data_out == 128'h00112233445566778899aabbccddeeff, "FIPS-197 C.1 plaintext");
    op(0, 128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 1);
    check(data_out == 128'h3925841d02dc09fbdc118597196a0b32, "FIPS-197 B ciphertext");

    // random blocks, both directions, round trip
    for (int i = 0; i < 12; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      op(0, k, p, 1'(i % 3 == 0));
      c = data_out;
      op(1, k, c, 1'(i % 4 == 1));
      check(data_out == p, "round trip");
      n_b2b++;
    end

    // reset in the middle restarts the fill
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    check(!ready, "not ready after reset");
    op(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    n_fill++;

    $display("mechanisms: fill=%0d enc=%0d dec(key precompute + backward schedule)=%0d back_to_back=%0d ignored_start_init=%0d ignored_start_busy=%0d key_change=%0d",
             n_fill, n_enc, n_dec, n_b2b, n_ign_init, n_ign_busy, n_key_change);
    check(n_fill > 0, "S-box fill happened");
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_b2b > 0, "back-to-back operations happened");
    check(n_ign_init > 0, "start during fill happened");
    check(n_ign_busy > 0, "start while busy happened");
    check(n_key_change > 0, "key change happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
