// tb_key_expand: runs the key schedule step by step, answering each S-box
// request with the reference S-box, forward from the cipher key to round key
// 10 (rcon 01..36) and then backward down to the cipher key again (rcon
// 36..01), comparing every round key with the reference expansion. Uses the
// FIPS-197 example key and random keys.
module tb_key_expand;
  import aes_ref_pkg::*;

  logic [127:0] key_in, key_out;
  logic inv;
  logic [7:0] rcon, rcon_next;
  logic [31:0] sub_addr, sub_word;
  rk_t rk;
  int checks = 0, failures = 0;

  key_expand dut (.key_in, .inv, .rcon, .sub_addr, .sub_word, .key_out, .rcon_next);

  always_comb sub_word = {ref_sbox(sub_addr[31:24]), ref_sbox(sub_addr[23:16]),
                          ref_sbox(sub_addr[15:8]),  ref_sbox(sub_addr[7:0])};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(logic [127:0] key);
    rk = ref_keys(key);
    key_in = key;
    inv = 1'b0;
    rcon = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      #1;
      check(key_out == rk[r], $sformatf("forward K%0d", r));
      key_in = key_out;
      if (r < 10) rcon = rcon_next;
    end
    check(rcon == 8'h36, "rcon 36 at round 10");
    inv = 1'b1;
    for (int r = 9; r >= 0; r--) begin
      #1;
      check(key_out == rk[r], $sformatf("backward K%0d", r));
      key_in = key_out;
      rcon = rcon_next;
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
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(rk[10] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "reference K10 of FIPS key");
    for (int i = 0; i < 50; i++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
