// Testbench for eea2_counter: T_1 layout for random COUNT / BEARER /
// DIRECTION (the inputs change right after the load and must not matter),
// then random increments checked against T_1 + k on the low 64 bits.
module tb_eea2_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, incr = 0, direction = 0;
  logic [31:0] count = 0;
  logic [4:0] bearer = 0;
  logic [127:0] t_block, exp_t;

  eea2_counter dut (.clk, .rst_n, .load, .count, .bearer, .direction, .incr, .t_block);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      count = $urandom;
      bearer = 5'($urandom);
      direction = 1'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      count = ~count;
      exp_t = {count ^ 32'hFFFF_FFFF, bearer, direction, 26'h0, 64'h0};
      checks++;
      if (t_block !== exp_t) begin
        failures++;
        $display("FAIL T1 %h exp %h", t_block, exp_t);
      end
      for (int i = 0; i < 600; i++) begin
        incr = $urandom % 2;
        @(negedge clk);
        if (incr) exp_t[63:0] = exp_t[63:0] + 1;
        checks++;
        if (t_block !== exp_t) begin
          failures++;
          if (failures < 10) $display("FAIL T %h exp %h", t_block, exp_t);
        end
      end
      incr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
