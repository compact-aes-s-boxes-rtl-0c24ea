// aes_ref_pkg: behavioural reference model used only by the testbenches.
// Written from the AES definition, independently of the RTL: field products
// by shift-and-add, inverses by exhaustive search, the S-box by inverse plus
// affine map, and the cipher, inverse cipher and key schedule round by round.
package aes_ref_pkg;

  // a*b mod the polynomial 'poly' (9-bit, e.g. 11B for AES, 11D for m'(x))
  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b,
                                         logic [8:0] poly = 9'h11B);
    logic [8:0] aa;
    logic [7:0] r;
    aa = {1'b0, a};
    r  = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa ^= poly;
    end
    return r;
  endfunction

  function automatic logic [7:0] ref_inv(logic [7:0] a, logic [8:0] poly = 9'h11B);
    for (int c = 1; c < 256; c++)
      if (ref_mul(a, 8'(c), poly) == 8'h01) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [7:0] ref_affine(logic [7:0] c);
    logic [7:0] b;
    for (int i = 0; i < 8; i++)
      b[i] = c[i] ^ c[(i+4)%8] ^ c[(i+5)%8] ^ c[(i+6)%8] ^ c[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    return ref_affine(ref_inv(x));
  endfunction

  // isomorphism GF(2^8)/11D -> GF(2^8)/11B sending 02 to 03
  function automatic logic [7:0] ref_bt(logic [7:0] d);
    logic [7:0] r, p;
    r = '0;
    p = 8'h01;
    for (int j = 0; j < 8; j++) begin
      if (d[j]) r ^= p;
      p = ref_mul(p, 8'h03);
    end
    return r;
  endfunction

  typedef logic [7:0] st_t [16];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127-8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = s[i];
    return b;
  endfunction

  function automatic logic [127:0] ref_shift(logic [127:0] d, bit inv);
    st_t s, o;
    s = to_st(d);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[4*c+r] = s[4*((c+r)%4)+r];
        else      o[4*((c+r)%4)+r] = s[4*c+r];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix(logic [127:0] d, bit inv);
    st_t s, o;
    logic [7:0] m0, m1, m2, m3;
    s = to_st(d);
    if (!inv) begin m0 = 8'h02; m1 = 8'h03; m2 = 8'h01; m3 = 8'h01; end
    else      begin m0 = 8'h0E; m1 = 8'h0B; m2 = 8'h0D; m3 = 8'h09; end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[4*c+r] = ref_mul(m0, s[4*c+r]) ^ ref_mul(m1, s[4*c+(r+1)%4]) ^
                   ref_mul(m2, s[4*c+(r+2)%4]) ^ ref_mul(m3, s[4*c+(r+3)%4]);
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_sub(logic [127:0] d, bit inv);
    st_t s;
    s = to_st(d);
    for (int i = 0; i < 16; i++)
      if (!inv) s[i] = ref_sbox(s[i]);
      else
        for (int c = 0; c < 256; c++)
          if (ref_sbox(8'(c)) == s[i]) begin s[i] = 8'(c); break; end
    return from_st(s);
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t ref_keys(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rk_t k;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) k[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return k;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    rk_t k;
    logic [127:0] s;
    k = ref_keys(key);
    s = pt ^ k[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift(ref_sub(s, 0), 0);
      if (r != 10) s = ref_mix(s, 0);
      s ^= k[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] key, logic [127:0] ct);
    rk_t k;
    logic [127:0] s;
    k = ref_keys(key);
    s = ct ^ k[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub(ref_shift(s, 1), 1);
      s ^= k[r];
      if (r != 0) s = ref_mix(s, 1);
    end
    return s;
  endfunction

endpackage
