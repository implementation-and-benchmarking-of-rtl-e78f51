// Shared types, constants and table functions for the LTE ciphering
// accelerator (128-EEA1 with SNOW 3G, 128-EEA2 with AES-128 in counter mode).
//
// The S-box contents and the MUL_alpha / DIV_alpha tables are not stored as
// literal tables. They are computed at elaboration time from their defining
// formulas, so the synthesised result is a fixed mapping:
//   S_R(x)  = Rijndael affine transform of the inverse of x in GF(2^8) mod 0x11B
//   S_Q(x)  = x + x^9 + x^13 + x^15 + x^33 + x^41 + x^45 + x^47 + x^49 + 0x25
//             in GF(2^8) mod 0x169 (the Dickson polynomial g49 of SNOW 3G)
//   MUL_alpha(c) = { c*b^23, c*b^245, c*b^48, c*b^239 } and
//   DIV_alpha(c) = { c*b^16, c*b^39,  c*b^6,  c*b^64  },
//             where c*b^i is i repeated left shifts of c, each reduced by 0xA9.
// These formulas come from the public SNOW 3G and AES specifications.
package lte_cipher_pkg;

  // Algorithm selection of the combined accelerator.
  typedef enum logic {
    ALG_EEA1 = 1'b0,   // SNOW 3G based
    ALG_EEA2 = 1'b1    // AES based, counter mode
  } alg_e;

  // Which 8-bit S-box a one-hot S-box instance realises.
  typedef enum logic {
    SBOX_SR = 1'b0,    // Rijndael S-box
    SBOX_SQ = 1'b1     // SNOW 3G S_Q box
  } sbox_kind_e;

  // Ciphering parameters of one PDU (field sizes as in the LTE spec).
  typedef struct packed {
    logic [127:0] key;        // cipher key
    logic [31:0]  count;      // COUNT (HFN and SN)
    logic [4:0]   bearer;     // radio bearer identity
    logic         direction;  // 0 uplink, 1 downlink
    logic [15:0]  length;     // number of bits to process
  } cipher_params_t;

  // Operation of one AES column slice in the current round.
  typedef enum logic [1:0] {
    RND_ARK_ONLY = 2'd0,   // first round: AddRoundKey only
    RND_FULL     = 2'd1,   // SubBytes, MixColumns, AddRoundKey
    RND_FINAL    = 2'd2    // last round: no MixColumns
  } aes_round_e;

  localparam int unsigned AES_ROUNDS   = 11;  // round transformations incl. the first ARK
  localparam int unsigned SNOW_INIT    = 32;  // initialisation clocks of SNOW 3G

  // ---------------------------------------------------------------- GF(2^8)

  // Multiply by x with reduction constant 'c' (the polynomial without x^8).
  function automatic logic [7:0] mulx(input logic [7:0] v, input logic [7:0] c);
    return v[7] ? ((v << 1) ^ c) : (v << 1);
  endfunction

  // General multiplication in GF(2^8) with reduction constant 'c'.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b,
                                        input logic [7:0] c);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = mulx(aa, c);
    end
    return p;
  endfunction

  // v times x^i, i repeated shifts (SNOW 3G MULxPOW).
  function automatic logic [7:0] mulx_pow(input logic [7:0] v, input int unsigned i,
                                          input logic [7:0] c);
    logic [7:0] r;
    r = v;
    for (int unsigned k = 0; k < i; k++) r = mulx(r, c);
    return r;
  endfunction

  // ---------------------------------------------------------------- S-boxes

  // Rijndael S-box: inverse (x^254) followed by the affine transform.
  function automatic logic [7:0] sr_value(input logic [7:0] x);
    logic [7:0] inv, sq, b;
    // x^254 = x^(2+4+8+16+32+64+128)
    inv = 8'h01;
    sq  = x;
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq, 8'h1B);
      inv = gf_mul(inv, sq, 8'h1B);
    end
    for (int i = 0; i < 8; i++)
      b[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^
             inv[(i + 7) % 8];
    return b ^ 8'h63;
  endfunction

  // SNOW 3G S_Q box from the Dickson polynomial g49 over GF(2^8) mod 0x169.
  function automatic logic [7:0] sq_value(input logic [7:0] x);
    logic [7:0] pw, acc;
    acc = 8'h25;
    pw  = x;                          // x^1
    for (int e = 1; e <= 49; e++) begin
      if (e == 1 || e == 9 || e == 13 || e == 15 || e == 33 || e == 41 ||
          e == 45 || e == 47 || e == 49)
        acc ^= pw;
      pw = gf_mul(pw, x, 8'h69);
    end
    return acc;
  endfunction

  function automatic logic [7:0] sbox_value(input sbox_kind_e kind, input logic [7:0] x);
    return (kind == SBOX_SR) ? sr_value(x) : sq_value(x);
  endfunction

  // ---------------------------------------------------------------- SNOW 3G maps

  function automatic logic [31:0] mul_alpha_value(input logic [7:0] c);
    return {mulx_pow(c, 23, 8'hA9), mulx_pow(c, 245, 8'hA9),
            mulx_pow(c, 48, 8'hA9), mulx_pow(c, 239, 8'hA9)};
  endfunction

  function automatic logic [31:0] div_alpha_value(input logic [7:0] c);
    return {mulx_pow(c, 16, 8'hA9), mulx_pow(c, 39, 8'hA9),
            mulx_pow(c, 6, 8'hA9),  mulx_pow(c, 64, 8'hA9)};
  endfunction

  // AES MixColumns on one column (c = 0x1B). Input bytes a0 (bits 31:24,
  // row 0) .. a3 (bits 7:0, row 3); out0 = 2a0 ^ 3a1 ^ a2 ^ a3 and rotations.
  function automatic logic [31:0] mix_column(input logic [31:0] a, input logic [7:0] c);
    logic [7:0] a0, a1, a2, a3;
    logic [7:0] r0, r1, r2, r3;
    {a0, a1, a2, a3} = a;
    r0 = mulx(a0, c) ^ mulx(a1, c) ^ a1 ^ a2 ^ a3;
    r1 = a0 ^ mulx(a1, c) ^ mulx(a2, c) ^ a2 ^ a3;
    r2 = a0 ^ a1 ^ mulx(a2, c) ^ mulx(a3, c) ^ a3;
    r3 = mulx(a0, c) ^ a0 ^ a1 ^ a2 ^ mulx(a3, c);
    return {r0, r1, r2, r3};
  endfunction

  // Column mix of the SNOW 3G S-boxes S1 (c = 0x1B) and S2 (c = 0x69):
  // r0 = 2w0 ^ w1 ^ w2 ^ 3w3 and rotations, with w0 in bits 31:24. It is the
  // AES matrix applied to the word with its bytes in reverse order.
  function automatic logic [31:0] snow_mix(input logic [31:0] w, input logic [7:0] c);
    logic [31:0] m;
    m = mix_column({w[7:0], w[15:8], w[23:16], w[31:24]}, c);
    return {m[7:0], m[15:8], m[23:16], m[31:24]};
  endfunction

endpackage
