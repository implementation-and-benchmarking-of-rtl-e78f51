// SNOW 3G 32-bit S-box S1, used between FSM registers R1 and R2.
//
// Each byte of the input word goes through a Rijndael S-box S_R, built as a
// one-hot decoder / switch / encoder (onehot_sbox). The four substituted bytes
// are then mixed by the SNOW 3G column matrix over GF(2^8) with reduction
// constant 0x1B: r0 = 2s0 ^ s1 ^ s2 ^ 3s3 and its rotations, with byte 0 in
// bits 31:24.
//
// Interface: w in, y out, purely combinational.
//
// The use of four S_R boxes follows the design, and so does building them
// one-hot. The mixing equations are those of the SNOW 3G specification.
module snow3g_s1
  import lte_cipher_pkg::*;
(
  input  logic [31:0] w,
  output logic [31:0] y
);

  logic [31:0] s;

  for (genvar i = 0; i < 4; i++) begin : g_sr
    onehot_sbox #(.KIND(SBOX_SR)) u_sr (.x(w[8*i +: 8]), .y(s[8*i +: 8]));
  end

  assign y = snow_mix(s, 8'h1B);

endmodule
