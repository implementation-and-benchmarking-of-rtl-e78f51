// SNOW 3G linear feedback shift register with its feedback part.
//
// Sixteen 32-bit cells S0..S15. On every step the cells shift down by one
// (S0 is dropped) and S15 takes the new feedback word
//   v = (S0 << 8) ^ MUL_alpha(S0[31:24]) ^ S2 ^ (S11 >> 8) ^ DIV_alpha(S11[7:0]) ^ m
// where m is the FSM output word F in initialisation mode and zero in
// keystream mode (the multiplexer with the "0...0" input). The cells S5 and
// S15 feed the FSM, S0 the keystream output.
//
// Interface: 'load' writes all sixteen cells from load_s (load_s[i] is Si),
// otherwise 'step' clocks the register once in the mode given by init_mode.
// Both act at the rising clock edge; load has priority. The reset value
// (all zero) is this implementation's choice.
//
// The taps and the two maps follow the design's block diagram. The load port
// and the load priority are choices of this implementation.
module snow3g_lfsr (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [15:0][31:0] load_s,
  input  logic             step,
  input  logic             init_mode,
  input  logic [31:0]      fsm_f,
  output logic [31:0]      s0,
  output logic [31:0]      s5,
  output logic [31:0]      s15
);

  logic [15:0][31:0] s_q;
  logic [31:0]       mul_a, div_a, feedback;

  snow3g_mul_alpha u_mul (.c(s_q[0][31:24]), .y(mul_a));
  snow3g_div_alpha u_div (.c(s_q[11][7:0]),  .y(div_a));

  always_comb begin
    feedback = {s_q[0][23:0], 8'h00} ^ mul_a ^ s_q[2] ^ {8'h00, s_q[11][31:8]} ^ div_a ^
               (init_mode ? fsm_f : 32'h0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
    end else if (load) begin
      s_q <= load_s;
    end else if (step) begin
      s_q <= {feedback, s_q[15:1]};
    end
  end

  assign s0  = s_q[0];
  assign s5  = s_q[5];
  assign s15 = s_q[15];

endmodule
