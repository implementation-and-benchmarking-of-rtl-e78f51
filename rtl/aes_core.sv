// AES-128 encryption core with a 128-bit data path.
//
// A 128-bit STATE register feeds four column slices (aes_column) that
// together perform one full round transformation per clock; the KEY register
// with its key expansion (aes_key_expansion) delivers the matching round key
// in the same clock. ShiftRows costs no logic: it is the byte order in which
// the slices read the STATE register.
//
// Timing, counted from the clock edge that samples 'start':
//   edge 0        STATE <= block_in, KEY <= key (initialisation cycle)
//   edge 1        round 0: AddRoundKey only
//   edges 2..10   rounds 1..9: SubBytes, ShiftRows, MixColumns, AddRoundKey
//   edge 11       round 10: no MixColumns; out_valid goes high
// so a block takes 12 clocks (1 + 11 rounds). The result stays in STATE, with
// out_valid high, until the next start. 'start' is accepted when the core is
// not busy, including the cycle in which out_valid is high, so blocks can be
// issued back to back every 12 clocks.
//
// Byte order: block_in[127:120] is byte 0 of the AES input, column c holds
// bytes 4c..4c+3.
//
// What follows the design: the 128-bit data path, 11 rounds plus one
// initialisation clock, and ShiftRows done in the STATE read order. The
// start/out_valid protocol is a choice of this implementation.
module aes_core
  import lte_cipher_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] block_in,
  output logic         busy,
  output logic         out_valid,
  output logic [127:0] block_out
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e       state_q;
  logic [3:0]   round_q;
  logic [127:0] state_reg, state_next, round_key, col_src;
  aes_round_e   mode;
  logic         accept;

  assign accept = start && (state_q != S_RUN);
  assign busy   = (state_q == S_RUN);

  always_comb begin
    if (round_q == 4'd0)                        mode = RND_ARK_ONLY;
    else if (round_q == 4'(AES_ROUNDS - 1))     mode = RND_FINAL;
    else                                        mode = RND_FULL;
  end

  // ShiftRows as the read order: row r of column c comes from column c + r.
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        col_src[127 - 8*(4*c + r) -: 8] =
          (mode == RND_ARK_ONLY) ? state_reg[127 - 8*(4*c + r) -: 8]
                                 : state_reg[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end

  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_column u_col (
      .col_in  (col_src[127 - 32*c -: 32]),
      .rk_word (round_key[127 - 32*c -: 32]),
      .mode    (mode),
      .col_out (state_next[127 - 32*c -: 32])
    );
  end

  aes_key_expansion u_key (
    .clk, .rst_n,
    .load   (accept),
    .key_in (key),
    .step   (state_q == S_RUN),
    .round_key
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      round_q   <= '0;
      state_reg <= '0;
    end else if (accept) begin
      state_q   <= S_RUN;
      round_q   <= '0;
      state_reg <= block_in;
    end else if (state_q == S_RUN) begin
      state_reg <= state_next;
      round_q   <= round_q + 4'd1;
      if (round_q == 4'(AES_ROUNDS - 1)) state_q <= S_DONE;
    end
  end

  assign out_valid = (state_q == S_DONE);
  assign block_out = state_reg;

endmodule
