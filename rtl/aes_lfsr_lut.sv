// aes_lfsr_lut: iterative AES-128 cipher/decipher whose S-boxes live in RAM
// that the design fills itself after reset, for FPGAs whose RAM cannot be
// preloaded by a configuration bitstream (flash-based, non-volatile parts).
//
// S-box storage. Ten 4-kbit true dual-port RAMs (dual_sbox) each hold the
// forward S-box in words 000-0FF and the inverse S-box in words 100-1FF and
// serve two lookups per clock. Eight of them serve the 16 state bytes, two
// serve the 4 bytes of the key-schedule SubWord. After reset one shared
// sbox_gen (LFSR pair + basis/affine transformations) writes all ten RAMs in
// parallel, one (x, S(x)) pair per clock, 256 clocks in all; 'ready' rises
// when that is done and the core is idle.
//
// Round timing. A round takes two clocks. In phase A the state bytes (after
// ShiftRows or InvShiftRows) and the rotated key word are presented to the
// RAMs as addresses; in phase B the looked-up bytes come back, the next round
// key is formed by key_expand, and the new state is registered:
//   encrypt: state = MixColumns(T) ^ K(r)   (no MixColumns in round 10)
//   decrypt: state = T ^ K(10-r), where the lookup of phase A was taken from
//            InvShiftRows(InvMixColumns(state)) (no InvMixColumns in the first
//            decrypt round), which is the inverse cipher with InvMixColumns
//            moved to the start of the following round.
// A single mix_columns instance serves both directions (InvMixColumns by the
// MixColumns o P decomposition), and a single 128-bit XOR does AddRoundKey.
// The key schedule runs on the fly: forward for encryption; for decryption
// the last round key is first derived with 10 forward steps (2 clocks each),
// then the schedule runs backward with the same key_expand logic.
//
// Interface. Pulse 'start' for one clock while 'ready' is high, with
// 'decrypt', 'key_in' and 'data_in' valid in that clock (they are captured
// into the input registers). 'done' pulses one clock when 'data_out' (the
// output register, held until the next result) is valid: it is registered
// by the 20th clock edge after the edge that took 'start' for encryption
// (10 rounds x 2 clocks) and by the 40th for decryption (10 key steps + 10
// rounds). The S-box fill makes 'ready' rise 258 clock edges after reset. 'start' while not ready
// is ignored. Reset is asynchronous, active low; it restarts the S-box fill.
//
// From the source design: the LFSR-pair generator, S-box and inverse S-box in
// one true dual-port RAM, 16 state S-boxes in 8 RAMs, shared cipher/decipher
// with shared AddRoundKey, SubBytes, MixColumns/InvMixColumns and
// forward/backward key expansion, input and output registers. This design's
// own: the two-clock round, the two RAMs for the key schedule, the single
// generator broadcasting to all RAMs, the decrypt-key precomputation and the
// start/ready/done handshake.
module aes_lfsr_lut
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   decrypt,
  input  block_t key_in,
  input  block_t data_in,
  output logic   ready,
  output logic   busy,
  output logic   done,
  output block_t data_out
);

  localparam int unsigned N_STATE_RAMS = 8;  // 16 state S-boxes, 2 per RAM
  localparam int unsigned N_KEY_RAMS   = 2;  // 4 key-schedule S-boxes
  localparam int unsigned N_RAMS = N_STATE_RAMS + N_KEY_RAMS;

  typedef enum logic [2:0] {
    S_BOOT,   // kick the S-box generator
    S_INIT,   // S-box RAMs being written
    S_IDLE,
    S_KEY_A,  // decrypt only: forward key expansion to K10, lookup phase
    S_KEY_B,  //   ... compute phase
    S_RND_A,  // round, lookup phase
    S_RND_B   // round, compute phase
  } fsm_t;

  fsm_t       fsm_q;
  block_t     state_q, key_q, din_q, dout_q;
  byte_t      rcon_q;
  logic [3:0] round_q;
  logic       dec_q, done_q;

  // ---------------------------------------------------------------- S-boxes
  logic       gen_start, gen_busy, gen_done, gen_we;
  sbox_addr_t gen_fwd_addr, gen_inv_addr;
  byte_t      gen_fwd_data, gen_inv_data;

  assign gen_start = (fsm_q == S_BOOT);

  sbox_gen u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (gen_start),
    .busy     (gen_busy),
    .done     (gen_done),
    .we       (gen_we),
    .fwd_addr (gen_fwd_addr),
    .fwd_data (gen_fwd_data),
    .inv_addr (gen_inv_addr),
    .inv_data (gen_inv_data)
  );

  byte_t lk_addr [2*N_RAMS];
  logic  lk_inv  [2*N_RAMS];
  byte_t lk_data [2*N_RAMS];

  for (genvar u = 0; u < N_RAMS; u++) begin : g_ram
    dual_sbox u_sbox (
      .clk           (clk),
      .init_we       (gen_we),
      .init_fwd_addr (gen_fwd_addr),
      .init_fwd_data (gen_fwd_data),
      .init_inv_addr (gen_inv_addr),
      .init_inv_data (gen_inv_data),
      .a_a           (lk_addr[2*u]),
      .inv_a         (lk_inv[2*u]),
      .q_a           (lk_data[2*u]),
      .a_b           (lk_addr[2*u+1]),
      .inv_b         (lk_inv[2*u+1]),
      .q_b           (lk_data[2*u+1])
    );
  end

  // --------------------------------------------------------------- datapath
  logic   first_rnd, last_rnd, key_inv;
  block_t mix_in, mix_out, lk_src, sr_out, sub_state, ark_in, state_next;
  block_t key_next;
  word_t  sub_addr, sub_word;
  byte_t  rcon_next;

  assign first_rnd = (round_q == 4'd1);
  assign last_rnd  = (round_q == 4'd10);
  // key schedule runs backward only during decrypt rounds
  assign key_inv   = dec_q && (fsm_q == S_RND_A || fsm_q == S_RND_B);

  // decrypt: InvMixColumns on the registered state ahead of the lookup;
  // encrypt: MixColumns on the looked-up bytes
  assign mix_in = dec_q ? state_q : sub_state;
  mix_columns u_mix (.d(mix_in), .inv(dec_q), .q(mix_out));

  assign lk_src = (dec_q && !first_rnd) ? mix_out : state_q;
  shift_rows u_sr (.d(lk_src), .inv(dec_q), .q(sr_out));

  key_expand u_key (
    .key_in    (key_q),
    .inv       (key_inv),
    .rcon      (rcon_q),
    .sub_addr  (sub_addr),
    .sub_word  (sub_word),
    .key_out   (key_next),
    .rcon_next (rcon_next)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      lk_addr[i] = get_byte(sr_out, i);
      lk_inv[i]  = dec_q;
    end
    for (int i = 0; i < 4; i++) begin
      lk_addr[16 + i] = sub_addr[31 - 8*i -: 8];
      lk_inv[16 + i]  = SBOX_TABLE_FWD;
    end
    for (int i = 0; i < 16; i++) sub_state[127 - 8*i -: 8] = lk_data[i];
    for (int i = 0; i < 4; i++)  sub_word[31 - 8*i -: 8]   = lk_data[16 + i];
  end

  assign ark_in     = (dec_q || last_rnd) ? sub_state : mix_out;
  assign state_next = ark_in ^ key_next;   // shared AddRoundKey

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q   <= S_BOOT;
      state_q <= '0;
      key_q   <= '0;
      din_q   <= '0;
      dout_q  <= '0;
      rcon_q  <= 8'h01;
      round_q <= 4'd1;
      dec_q   <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (fsm_q)
        S_BOOT: fsm_q <= S_INIT;
        S_INIT: if (gen_done && !gen_busy) fsm_q <= S_IDLE;
        S_IDLE: begin
          if (start) begin
            key_q   <= key_in;
            din_q   <= data_in;
            dec_q   <= decrypt;
            rcon_q  <= 8'h01;
            round_q <= 4'd1;
            if (decrypt) begin
              fsm_q <= S_KEY_A;
            end else begin
              state_q <= data_in ^ key_in;     // initial AddRoundKey
              fsm_q   <= S_RND_A;
            end
          end
        end
        S_KEY_A: fsm_q <= S_KEY_B;
        S_KEY_B: begin
          key_q <= key_next;
          if (last_rnd) begin
            // K10 reached; rcon stays 36 for the first backward step
            state_q <= din_q ^ key_next;
            round_q <= 4'd1;
            fsm_q   <= S_RND_A;
          end else begin
            rcon_q  <= rcon_next;
            round_q <= round_q + 4'd1;
            fsm_q   <= S_KEY_A;
          end
        end
        S_RND_A: fsm_q <= S_RND_B;
        S_RND_B: begin
          key_q   <= key_next;
          rcon_q  <= rcon_next;
          state_q <= state_next;
          if (last_rnd) begin
            dout_q <= state_next;
            done_q <= 1'b1;
            fsm_q  <= S_IDLE;
          end else begin
            round_q <= round_q + 4'd1;
            fsm_q   <= S_RND_A;
          end
        end
        default: fsm_q <= S_BOOT;
      endcase
    end
  end

  assign ready    = (fsm_q == S_IDLE);
  assign busy     = !(fsm_q == S_IDLE);
  assign done     = done_q;
  assign data_out = dout_q;

endmodule
