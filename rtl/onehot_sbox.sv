// One-hot 8-bit S-box (decoder / switching block / encoder structure).
//
// The byte x is first decoded into 256 one-hot lines: two 4-to-16 predecoders
// for the high and low nibble, and one AND gate per line. The switching block
// is pure wiring: line x is routed to line S(x), so exactly one line of the
// switched bus is high. The encoder turns the switched bus back into a byte,
// output bit b being the OR of the 128 lines whose index has bit b set.
// Because only two decoder lines and one encoder path toggle per input
// change, this structure has low switching activity.
//
// KIND selects the substitution: SBOX_SR is the Rijndael S-box used by AES
// and by SNOW 3G S1, SBOX_SQ is the SNOW 3G S_Q box used by S2. The wiring of
// the switching block is computed from the S-box formulas in lte_cipher_pkg.
//
// Interface: x in, y out, purely combinational (no clock, zero latency).
// The decoder-switch-encoder idea follows the design; the nibble predecoder
// split is a choice of this implementation.
module onehot_sbox
  import lte_cipher_pkg::*;
#(
  parameter sbox_kind_e KIND = SBOX_SR
) (
  input  logic [7:0] x,
  output logic [7:0] y
);

  logic [15:0]  hi_dec, lo_dec;   // nibble predecoders
  logic [255:0] dec;              // one-hot decoder output, line x
  logic [255:0] sw;               // after the switching block, line S(x)

  always_comb begin
    hi_dec = 16'(1) << x[7:4];
    lo_dec = 16'(1) << x[3:0];
  end

  // Decoder: one AND per line.
  for (genvar i = 0; i < 256; i++) begin : g_dec
    assign dec[i] = hi_dec[i / 16] & lo_dec[i % 16];
  end

  // Switching block: fixed wiring, line i goes to line S(i).
  for (genvar i = 0; i < 256; i++) begin : g_sw
    localparam logic [7:0] TARGET = sbox_value(KIND, 8'(i));
    assign sw[TARGET] = dec[i];
  end

  // Encoder: output bit b is the OR of the 128 lines whose index has bit b set.
  function automatic logic [255:0] bit_lines(input logic [2:0] b);
    logic [255:0] m;
    logic [7:0]   idx;
    for (int j = 0; j < 256; j++) begin
      idx  = 8'(j);
      m[j] = idx[b];
    end
    return m;
  endfunction

  for (genvar b = 0; b < 8; b++) begin : g_enc
    localparam logic [255:0] LINES = bit_lines(3'(b));
    assign y[b] = |(sw & LINES);
  end

endmodule
