// SNOW 3G MUL_alpha map: the upper byte of LFSR word S0 to a 32-bit word.
//
// The map is a 256 x 32-bit look-up table. Its entries are the byte c times
// powers (23, 245, 48, 239) of the generator of GF(2^8) mod 0x1A9, packed from the
// most to the least significant byte; lte_cipher_pkg computes them at
// elaboration time, so synthesis sees a constant table. The design keeps
// these maps as synthesised look-up tables rather than computing them with
// loops, because that gives the more compact circuit.
//
// Interface: c in, y out, purely combinational.
//
// The table form follows the design; the table contents are those of the
// SNOW 3G specification.
module snow3g_mul_alpha
  import lte_cipher_pkg::*;
(
  input  logic [7:0]  c,
  output logic [31:0] y
);

  logic [31:0] table_q [256];

  for (genvar i = 0; i < 256; i++) begin : g_tab
    assign table_q[i] = mul_alpha_value(8'(i));
  end

  assign y = table_q[c];

endmodule
