// One 32-bit column slice of the AES-128 round datapath.
//
// Four of these slices side by side form the 128-bit round: each takes one
// column of the STATE register (already read through ShiftRows, except in
// the first round), substitutes its four bytes with one-hot Rijndael S-boxes
// (SubBytes), multiplies the column by the MixColumns matrix and XORs the
// matching 32-bit word of the round key (AddRoundKey). The round mode picks
// the path: RND_ARK_ONLY is the first round (AddRoundKey only), RND_FULL a
// middle round and RND_FINAL the last round, which skips MixColumns.
//
// Byte order: bits 31:24 hold row 0 of the column, bits 7:0 row 3.
// Interface: purely combinational, col_in / rk_word / mode in, col_out out.
//
// The slice contents follow the design's block diagram. The round-mode
// bypass multiplexers are how this implementation skips MixColumns and
// SubBytes where the algorithm requires it.
module aes_column
  import lte_cipher_pkg::*;
(
  input  logic [31:0] col_in,
  input  logic [31:0] rk_word,
  input  aes_round_e  mode,
  output logic [31:0] col_out
);

  logic [31:0] sub, mixed;

  for (genvar i = 0; i < 4; i++) begin : g_sr
    onehot_sbox #(.KIND(SBOX_SR)) u_sr (.x(col_in[8*i +: 8]), .y(sub[8*i +: 8]));
  end

  assign mixed = mix_column(sub, 8'h1B);

  always_comb begin
    unique case (mode)
      RND_ARK_ONLY: col_out = col_in ^ rk_word;
      RND_FULL:     col_out = mixed ^ rk_word;
      default:      col_out = sub ^ rk_word;
    endcase
  end

endmodule
