// SNOW 3G 32-bit S-box S2, used between FSM registers R2 and R3.
//
// Each byte of the input word goes through the S-box S_Q, built as a
// one-hot decoder / switch / encoder (onehot_sbox). The four substituted bytes
// are then mixed by the SNOW 3G column matrix over GF(2^8) with reduction
// constant 0x69: r0 = 2s0 ^ s1 ^ s2 ^ 3s3 and its rotations, with byte 0 in
// bits 31:24.
//
// Interface: w in, y out, purely combinational.
//
// The use of four S_Q boxes follows the design, and so does building them
// one-hot. The mixing equations are those of the SNOW 3G specification.
module snow3g_s2
  import lte_cipher_pkg::*;
(
  input  logic [31:0] w,
  output logic [31:0] y
);

  logic [31:0] s;

  for (genvar i = 0; i < 4; i++) begin : g_sq
    onehot_sbox #(.KIND(SBOX_SQ)) u_sq (.x(w[8*i +: 8]), .y(s[8*i +: 8]));
  end

  assign y = snow_mix(s, 8'h69);

endmodule
