// Testbench for snow3g_fsm: after a clear, random S5/S15 inputs and random
// steps; F and the register update are checked against the reference FSM.
module tb_snow3g_fsm;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear = 0, step = 0;
  logic [31:0] s5 = 0, s15 = 0, f;
  snow3g_ref m = new();

  snow3g_fsm dut (.clk, .rst_n, .clear, .step, .s5, .s15, .f);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_f;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      clear = 1;
      m.r1 = 0; m.r2 = 0; m.r3 = 0;
      @(negedge clk);
      clear = 0;
      for (int t = 0; t < 500; t++) begin
        s5 = $urandom;
        s15 = $urandom;
        step = ($urandom % 3) != 0;
        m.s[5] = s5;
        m.s[15] = s15;
        #1;
        exp_f = (s15 + m.r1) ^ m.r2;
        checks++;
        if (f !== exp_f) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d f=%08h exp %08h", t, f, exp_f);
        end
        if (step) void'(m.clock_fsm());
        @(negedge clk);
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
