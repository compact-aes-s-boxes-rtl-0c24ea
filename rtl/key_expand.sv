// key_expand: one step of the AES-128 key schedule, forward (inv = 0: round
// key K(r-1) -> K(r)) or backward (inv = 1: K(r) -> K(r-1)). Both directions
// share the S-box lookup of a rotated word and the XOR chain:
//   forward : t = SubWord(RotWord(w3))      ^ {rcon,0,0,0}
//             w0' = w0^t, w1' = w1^w0', w2' = w2^w1', w3' = w3^w2'
//   backward: w3' = w3^w2, w2' = w2^w1, w1' = w1^w0,
//             w0' = w0 ^ SubWord(RotWord(w3')) ^ {rcon,0,0,0}
// 'sub_addr' is the rotated word to look up (RotWord(w3) or RotWord(w3^w2));
// the caller returns its forward S-box image on 'sub_word' (one RAM clock
// later in this design; the module itself is combinational). 'rcon' is the
// round constant of the step (rcon of round r for both directions);
// 'rcon_next' is the constant for the following step (x2 forward, x8D i.e.
// /2 backward). Sharing forward and backward expansion follows the source
// design; the exact sharing structure is this design's.
module key_expand
  import aes_pkg::*;
(
  input  block_t key_in,
  input  logic   inv,
  input  byte_t  rcon,
  output word_t  sub_addr,
  input  word_t  sub_word,
  output block_t key_out,
  output byte_t  rcon_next
);

  word_t w0, w1, w2, w3, src, t;
  word_t n0, n1, n2, n3;

  always_comb begin
    {w0, w1, w2, w3} = key_in;
    src      = inv ? (w3 ^ w2) : w3;
    sub_addr = {src[23:0], src[31:24]};
    t        = sub_word ^ {rcon, 24'h0};
    n0       = w0 ^ t;
    if (inv) begin
      n1 = w1 ^ w0;
      n2 = w2 ^ w1;
      n3 = w3 ^ w2;
    end else begin
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
    end
    key_out   = {n0, n1, n2, n3};
    rcon_next = inv ? xtime_inv(rcon) : xtime(rcon);
  end

endmodule
