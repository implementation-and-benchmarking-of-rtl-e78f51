// Reference models for the testbenches: SNOW 3G, 128-EEA1, AES-128 and
// 128-EEA2, written as plain sequential software. The S-boxes are formed in a
// different way from the RTL package (inverse found by search, the Dickson
// polynomial evaluated term by term, the tables built once and looked up),
// so the testbenches do not compare the RTL with itself.
package cipher_ref_pkg;

  function automatic logic [7:0] r_xtime(input logic [7:0] v, input logic [7:0] c);
    return {v[6:0], 1'b0} ^ (v[7] ? c : 8'h00);
  endfunction

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b,
                                       input logic [7:0] c);
    logic [7:0] r = 0;
    for (int i = 7; i >= 0; i--) begin
      r = r_xtime(r, c);
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  function automatic logic [7:0] ref_sr(input logic [7:0] x);
    logic [7:0] inv = 0;
    for (int k = 1; k < 256; k++)
      if (r_mul(x, 8'(k), 8'h1B) == 8'h01) inv = 8'(k);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] r_pow(input logic [7:0] x, input int e);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < e; i++) r = r_mul(r, x, 8'h69);
    return r;
  endfunction

  function automatic logic [7:0] ref_sq(input logic [7:0] x);
    int exps[9] = '{1, 9, 13, 15, 33, 41, 45, 47, 49};
    logic [7:0] acc = 8'h25;
    foreach (exps[i]) acc ^= r_pow(x, exps[i]);
    return acc;
  endfunction

  function automatic logic [7:0] r_mulxpow(input logic [7:0] v, input int i,
                                           input logic [7:0] c);
    if (i == 0) return v;
    return r_xtime(r_mulxpow(v, i - 1, c), c);
  endfunction

  function automatic logic [31:0] ref_mul_alpha(input logic [7:0] c);
    return {r_mulxpow(c, 23, 8'hA9), r_mulxpow(c, 245, 8'hA9),
            r_mulxpow(c, 48, 8'hA9), r_mulxpow(c, 239, 8'hA9)};
  endfunction

  function automatic logic [31:0] ref_div_alpha(input logic [7:0] c);
    return {r_mulxpow(c, 16, 8'hA9), r_mulxpow(c, 39, 8'hA9),
            r_mulxpow(c, 6, 8'hA9), r_mulxpow(c, 64, 8'hA9)};
  endfunction

  // Tables, built once by build_tables().
  logic [7:0]  SR_T[256];
  logic [7:0]  SQ_T[256];
  logic [31:0] MA_T[256];
  logic [31:0] DA_T[256];
  bit          built = 0;

  function automatic void build_tables();
    if (built) return;
    for (int i = 0; i < 256; i++) begin
      SR_T[i] = ref_sr(8'(i));
      SQ_T[i] = ref_sq(8'(i));
      MA_T[i] = ref_mul_alpha(8'(i));
      DA_T[i] = ref_div_alpha(8'(i));
    end
    built = 1;
  endfunction

  // SNOW 3G 32-bit S-boxes (byte w0 is bits 31:24).
  function automatic logic [31:0] r_s32(input logic [31:0] w, input bit use_q);
    logic [7:0] s[4], r[4], c;
    c = use_q ? 8'h69 : 8'h1B;
    for (int i = 0; i < 4; i++) s[i] = use_q ? SQ_T[w[31 - 8*i -: 8]] : SR_T[w[31 - 8*i -: 8]];
    r[0] = r_xtime(s[0], c) ^ s[1] ^ s[2] ^ r_xtime(s[3], c) ^ s[3];
    r[1] = r_xtime(s[0], c) ^ s[0] ^ r_xtime(s[1], c) ^ s[2] ^ s[3];
    r[2] = s[0] ^ r_xtime(s[1], c) ^ s[1] ^ r_xtime(s[2], c) ^ s[3];
    r[3] = s[0] ^ s[1] ^ r_xtime(s[2], c) ^ s[2] ^ r_xtime(s[3], c);
    return {r[0], r[1], r[2], r[3]};
  endfunction

  class snow3g_ref;
    logic [31:0] s[16];
    logic [31:0] r1, r2, r3;

    function logic [31:0] clock_fsm();
      logic [31:0] f, r;
      f  = (s[15] + r1) ^ r2;
      r  = r2 + (r3 ^ s[5]);
      r3 = r_s32(r2, 1);
      r2 = r_s32(r1, 0);
      r1 = r;
      return f;
    endfunction

    function void clock_lfsr(input logic [31:0] f);
      logic [31:0] v;
      v = {s[0][23:0], 8'h00} ^ MA_T[s[0][31:24]] ^ s[2] ^ {8'h00, s[11][31:8]} ^
          DA_T[s[11][7:0]] ^ f;
      for (int i = 0; i < 15; i++) s[i] = s[i + 1];
      s[15] = v;
    endfunction

    // k[3] and iv[3] are the most significant words of key and IV.
    function void init(input logic [31:0] k[4], input logic [31:0] iv[4]);
      logic [31:0] one = '1;
      build_tables();
      s[15] = k[3] ^ iv[0];  s[14] = k[2];  s[13] = k[1];  s[12] = k[0] ^ iv[1];
      s[11] = k[3] ^ one;    s[10] = k[2] ^ one ^ iv[2];  s[9] = k[1] ^ one ^ iv[3];
      s[8]  = k[0] ^ one;    s[7] = k[3];   s[6] = k[2];   s[5] = k[1];   s[4] = k[0];
      s[3]  = k[3] ^ one;    s[2] = k[2] ^ one;  s[1] = k[1] ^ one;  s[0] = k[0] ^ one;
      r1 = 0; r2 = 0; r3 = 0;
      for (int i = 0; i < 32; i++) clock_lfsr(clock_fsm());
      void'(clock_fsm());
      clock_lfsr(0);
    endfunction

    function logic [31:0] next_word();
      logic [31:0] z;
      z = clock_fsm() ^ s[0];
      clock_lfsr(0);
      return z;
    endfunction
  endclass

  // 128-EEA1 keystream: n words.
  function automatic void eea1_keystream(input logic [127:0] key, input logic [31:0] count,
                                         input logic [4:0] bearer, input logic dir,
                                         input int n, ref logic [31:0] ks[$]);
    snow3g_ref g = new();
    logic [31:0] k[4], iv[4];
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
    iv[3] = count;  iv[2] = {bearer, dir, 26'h0};
    iv[1] = count;  iv[0] = {bearer, dir, 26'h0};
    g.init(k, iv);
    ks.delete();
    for (int i = 0; i < n; i++) ks.push_back(g.next_word());
  endfunction

  // AES-128 encryption, byte oriented, full key schedule first.
  function automatic logic [127:0] aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] w[176];
    logic [7:0] st[16], t[16];
    logic [7:0] rc = 8'h01;
    build_tables();
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    for (int i = 16; i < 176; i += 4) begin
      logic [7:0] tmp[4];
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        logic [7:0] t0 = tmp[0];
        tmp[0] = SR_T[tmp[1]] ^ rc;  tmp[1] = SR_T[tmp[2]];
        tmp[2] = SR_T[tmp[3]];       tmp[3] = SR_T[t0];
        rc = r_xtime(rc, 8'h1B);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) st[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // SubBytes + ShiftRows (byte index = 4*col + row)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) t[4*c + r] = SR_T[st[4*((c + r) % 4) + r]];
      if (rnd != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0 = t[4*c], a1 = t[4*c+1], a2 = t[4*c+2], a3 = t[4*c+3];
          t[4*c]   = r_mul(a0, 2, 8'h1B) ^ r_mul(a1, 3, 8'h1B) ^ a2 ^ a3;
          t[4*c+1] = a0 ^ r_mul(a1, 2, 8'h1B) ^ r_mul(a2, 3, 8'h1B) ^ a3;
          t[4*c+2] = a0 ^ a1 ^ r_mul(a2, 2, 8'h1B) ^ r_mul(a3, 3, 8'h1B);
          t[4*c+3] = r_mul(a0, 3, 8'h1B) ^ a1 ^ a2 ^ r_mul(a3, 2, 8'h1B);
        end
      for (int i = 0; i < 16; i++) st[i] = t[i] ^ w[16*rnd + i];
    end
    begin
      logic [127:0] o;
      for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = st[i];
      return o;
    end
  endfunction

  // 128-EEA2 keystream: n 32-bit words (block k gives words 4k..4k+3, MSW first).
  function automatic void eea2_keystream(input logic [127:0] key, input logic [31:0] count,
                                         input logic [4:0] bearer, input logic dir,
                                         input int n, ref logic [31:0] ks[$]);
    logic [127:0] ctr = {count, bearer, dir, 26'h0, 64'h0};
    logic [127:0] blk;
    ks.delete();
    for (int i = 0; i < n; i++) begin
      if (i % 4 == 0) begin
        blk = aes128(key, ctr);
        ctr[63:0] = ctr[63:0] + 64'd1;
      end
      ks.push_back(blk[127 - 32*(i % 4) -: 32]);
    end
  endfunction

endpackage
