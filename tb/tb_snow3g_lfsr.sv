// Testbench for snow3g_lfsr: random loads, then a random mix of
// initialisation-mode steps (random F), keystream-mode steps and idle cycles,
// checking S0, S5 and S15 against the reference LFSR after every cycle.
module tb_snow3g_lfsr;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0, init_mode = 0;
  logic [15:0][31:0] load_s;
  logic [31:0] fsm_f = 0, s0, s5, s15;
  snow3g_ref m = new();

  snow3g_lfsr dut (.clk, .rst_n, .load, .load_s, .step, .init_mode, .fsm_f, .s0, .s5, .s15);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 4; pass++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        load_s[i] = $urandom;
        m.s[i] = load_s[i];
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int t = 0; t < 300; t++) begin
        step = ($urandom % 4) != 0;
        init_mode = $urandom % 2;
        fsm_f = $urandom;
        if (step) m.clock_lfsr(init_mode ? fsm_f : 32'h0);
        @(negedge clk);
        checks++;
        if (s0 !== m.s[0] || s5 !== m.s[5] || s15 !== m.s[15]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d s0=%08h/%08h s15=%08h/%08h", t, s0, m.s[0], s15, m.s[15]);
        end
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
