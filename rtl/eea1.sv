// 128-EEA1 ciphering engine: SNOW 3G keystream XORed with a 32-bit data stream.
//
// On 'start' the engine forms the SNOW 3G key from KEY (KEY[127:96] is word
// k3) and the IV from COUNT, BEARER and DIRECTION,
//   IV3 = COUNT, IV2 = BEARER|DIRECTION|0..0, IV1 = COUNT, IV0 = BEARER|DIRECTION|0..0,
// and starts the keystream generator. After its 34-cycle start-up (load, 32
// initialisation clocks, one discarded word) it XORs one keystream word with
// one data word per clock, for ceil(LENGTH/32) words. Ciphering and
// deciphering are the same operation. Bits of the last word beyond LENGTH
// are returned as zero; the first bit of the PDU is bit 31 of the first word.
//
// Stream interface: a word moves when in_valid and out_ready are both high
// while the keystream is ready; in_ready and out_valid show that condition
// to each side, so input and output move together with no buffering.
// out_last marks the final word. 'start' is ignored while busy; LENGTH = 0
// finishes at once. The parameters are sampled only in the start cycle.
//
// What follows the design: the parameter set, the use of SNOW 3G and
// LENGTH/32 words. Choices of this implementation: the stream handshake, the
// rounding up to whole words and the zeroed tail.
module eea1
  import lte_cipher_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  cipher_params_t params,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [31:0]    in_data,
  output logic           out_valid,
  input  logic           out_ready,
  output logic [31:0]    out_data,
  output logic           out_last,
  output logic           busy
);

  logic        running_q;
  logic [15:0] length_q;
  logic [10:0] nwords, word_q;
  logic        accept, ks_valid, ks_ready, xfer, last;
  logic [31:0] ks_word, mask;
  logic [31:0] bd_word;
  logic        snow_busy;

  assign accept  = start && !running_q;
  assign bd_word = {params.bearer, params.direction, 26'h0};
  assign nwords  = 11'((17'(length_q) + 17'd31) >> 5);
  assign last    = (word_q == nwords - 11'd1);

  snow3g_core u_snow (
    .clk, .rst_n,
    .start    (accept),
    .key      (params.key),
    .iv       ({params.count, bd_word, params.count, bd_word}),
    .ks_valid,
    .ks_ready,
    .ks_word,
    .busy     (snow_busy)
  );

  assign out_valid = running_q && ks_valid && in_valid;
  assign in_ready  = running_q && ks_valid && out_ready;
  assign xfer      = out_valid && out_ready;
  assign ks_ready  = xfer;

  always_comb begin
    mask = '1;
    if (last && length_q[4:0] != 5'd0) mask = ~(32'hFFFF_FFFF >> length_q[4:0]);
  end

  assign out_data = (in_data ^ ks_word) & mask;
  assign out_last = last;
  assign busy     = running_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running_q <= 1'b0;
      length_q  <= '0;
      word_q    <= '0;
    end else if (accept) begin
      running_q <= (params.length != 16'd0);
      length_q  <= params.length;
      word_q    <= '0;
    end else if (xfer) begin
      word_q <= word_q + 11'd1;
      if (last) running_q <= 1'b0;
    end
  end

  // A word can only be transferred while a keystream word is available.
  a_xfer_has_ks: assert property (@(posedge clk) disable iff (!rst_n) xfer |-> ks_valid);
  // No word moves while the generator is still initialising.
  a_no_xfer_in_init: assert property (@(posedge clk) disable iff (!rst_n) snow_busy |-> !xfer);

endmodule
