// SNOW 3G keystream generator (LFSR, FSM and mode control).
//
// Timing, counted from the clock edge that samples 'start':
//   edge 0        load: the LFSR is filled from key and IV, R1..R3 cleared
//   edges 1..32   initialisation mode: LFSR and FSM clocked together, the FSM
//                 output F entering the LFSR feedback
//   edge 33       first keystream-mode clock; its FSM output is discarded
//   from then on  ks_valid is high and ks_word = F ^ S0 is the next 32-bit
//                 keystream word; each cycle with ks_ready high consumes it
//                 and clocks LFSR and FSM once (one word per clock)
// So the first word is offered 34 cycles after start, and with ks_ready held
// high one word follows per clock. 'start' may be given at any time and
// restarts the generator. The generator keeps producing words until the next
// start; the user decides how many to take.
//
// Key and IV words: key[127:96] is k3 and key[31:0] is k0, likewise for the
// IV. The LFSR load pattern (key words, their complements and IV words) is
// the one of the SNOW 3G specification.
//
// The 32 initialisation clocks and the discarded first word follow the
// design. The load cycle, the ks_valid/ks_ready flow control and the restart
// behaviour are choices of this implementation.
module snow3g_core
  import lte_cipher_pkg::*;
#(
  parameter int unsigned INIT_CLOCKS = SNOW_INIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  output logic         ks_valid,
  input  logic         ks_ready,
  output logic [31:0]  ks_word,
  output logic         busy
);

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_DISCARD, S_STREAM} state_e;

  state_e            state_q;
  logic [5:0]        cnt_q;
  logic [15:0][31:0] load_s;
  logic [31:0]       k [4];
  logic [31:0]       ivw [4];
  logic [31:0]       s0, s5, s15, f;
  logic              step, init_mode;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      k[i]   = key[32*i +: 32];
      ivw[i] = iv[32*i +: 32];
    end
    load_s[15] = k[3] ^ ivw[0];
    load_s[14] = k[2];
    load_s[13] = k[1];
    load_s[12] = k[0] ^ ivw[1];
    load_s[11] = ~k[3];
    load_s[10] = ~k[2] ^ ivw[2];
    load_s[9]  = ~k[1] ^ ivw[3];
    load_s[8]  = ~k[0];
    load_s[7]  = k[3];
    load_s[6]  = k[2];
    load_s[5]  = k[1];
    load_s[4]  = k[0];
    load_s[3]  = ~k[3];
    load_s[2]  = ~k[2];
    load_s[1]  = ~k[1];
    load_s[0]  = ~k[0];
  end

  assign init_mode = (state_q == S_INIT);
  assign ks_valid  = (state_q == S_STREAM);
  assign step      = !start && (init_mode || state_q == S_DISCARD ||
                                (ks_valid && ks_ready));
  assign ks_word   = f ^ s0;
  assign busy      = (state_q == S_INIT) || (state_q == S_DISCARD);

  snow3g_lfsr u_lfsr (
    .clk, .rst_n, .load(start), .load_s, .step, .init_mode, .fsm_f(f),
    .s0, .s5, .s15
  );

  snow3g_fsm u_fsm (
    .clk, .rst_n, .clear(start), .step, .s5, .s15, .f
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else if (start) begin
      state_q <= S_INIT;
      cnt_q   <= '0;
    end else begin
      case (state_q)
        S_INIT: begin
          cnt_q <= cnt_q + 6'd1;
          if (cnt_q == 6'(INIT_CLOCKS - 1)) state_q <= S_DISCARD;
        end
        S_DISCARD: state_q <= S_STREAM;
        default: ;
      endcase
    end
  end

endmodule
