// SNOW 3G finite state machine: registers R1, R2, R3 and the output word F.
//
// F = (S15 + R1) ^ R2, with + the 32-bit addition modulo 2^32. On a step the
// registers update together: R1 <= R2 + (R3 ^ S5), R2 <= S1(R1), R3 <= S2(R2).
// S1 uses four Rijndael S-boxes and S2 four S_Q boxes (both one-hot).
//
// Interface: 'clear' zeroes R1..R3 (start of an initialisation), otherwise
// 'step' clocks the FSM once; both act at the rising edge. F is combinational
// from the registers and S15, so it is valid in the cycle before the step
// that consumes it.
//
// The register/S-box/adder structure follows the design. The exact
// equations are from the SNOW 3G specification; the clear input is a choice
// of this implementation.
module snow3g_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        step,
  input  logic [31:0] s5,
  input  logic [31:0] s15,
  output logic [31:0] f
);

  logic [31:0] r1_q, r2_q, r3_q;
  logic [31:0] s1_out, s2_out;

  snow3g_s1 u_s1 (.w(r1_q), .y(s1_out));
  snow3g_s2 u_s2 (.w(r2_q), .y(s2_out));

  assign f = (s15 + r1_q) ^ r2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_q <= '0;
      r2_q <= '0;
      r3_q <= '0;
    end else if (clear) begin
      r1_q <= '0;
      r2_q <= '0;
      r3_q <= '0;
    end else if (step) begin
      r1_q <= r2_q + (r3_q ^ s5);
      r2_q <= s1_out;
      r3_q <= s2_out;
    end
  end

endmodule
