// Testbench for aes_key_expansion: the FIPS-197 key 2b7e1516... must give
// round key 10 = d014f9a8 c9ee2589 e13f0cc8 b6630ca6; random keys are
// checked round by round against a reference key schedule, with idle
// cycles between steps.
module tb_aes_key_expansion;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0;
  logic [127:0] key_in, round_key;

  aes_key_expansion dut (.clk, .rst_n, .load, .key_in, .step, .round_key);

  always #5 clk = ~clk;

  function automatic logic [127:0] ref_next(input logic [127:0] k, input logic [7:0] rc);
    logic [31:0] w[4], t;
    for (int i = 0; i < 4; i++) w[i] = k[127 - 32*i -: 32];
    t = {SR_T[w[3][23:16]] ^ rc, SR_T[w[3][15:8]], SR_T[w[3][7:0]], SR_T[w[3][31:24]]};
    w[0] ^= t;
    w[1] ^= w[0];
    w[2] ^= w[1];
    w[3] ^= w[2];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    logic [7:0] rc;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      k = (r == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      key_in = k;
      load = 1;
      @(negedge clk);
      load = 0;
      rc = 8'h01;
      for (int rnd = 1; rnd <= 10; rnd++) begin
        while (($urandom % 3) == 0) @(negedge clk);
        step = 1;
        @(negedge clk);
        step = 0;
        k = ref_next(k, rc);
        rc = r_xtime(rc, 8'h1B);
        checks++;
        if (round_key !== k) begin
          failures++;
          if (failures < 10) $display("FAIL key %0d round %0d %h exp %h", r, rnd, round_key, k);
        end
      end
      if (r == 0) begin
        checks++;
        if (round_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
          failures++;
          $display("FAIL FIPS-197 round key 10 %h", round_key);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
