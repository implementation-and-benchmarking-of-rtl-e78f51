// Testbench for snow3g_core.
//  * Known answer: SNOW 3G test set 1 (key 2BD6459F..., IV EA024714...),
//    first keystream words ABEE9704 and 7AC31373.
//  * Start-up time: the first word must be offered exactly 34 cycles after
//    the start edge (1 load + 32 initialisation + 1 discarded clock).
//  * Random keys and IVs: 200 words each against the reference model, with
//    random ks_ready stalls, and one run with ks_ready held high that must
//    deliver one word per clock.
//  * A restart in the middle of a keystream.
module tb_snow3g_core;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, ks_ready = 0;
  logic [127:0] key, iv;
  logic ks_valid, busy;
  logic [31:0] ks_word;

  snow3g_core dut (.clk, .rst_n, .start, .key, .iv, .ks_valid, .ks_ready, .ks_word, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Start, check the start-up time, then take n words (stall_pct % of cycles
  // with ks_ready low) and compare with exp.
  task automatic run(input logic [127:0] k, input logic [127:0] v, input int n,
                     input int stall_pct, ref logic [31:0] exp_w[$]);
    int cyc = 0, got = 0, busy_cycles = 0;
    key = k;
    iv = v;
    start = 1;
    @(negedge clk);
    start = 0;
    key = $urandom;           // parameters must only matter in the start cycle
    iv = $urandom;
    while (!ks_valid) begin
      cyc++;
      @(negedge clk);
      if (cyc > 100) break;
    end
    check(cyc == 33, $sformatf("first word after %0d cycles, expected 34", cyc + 1));
    while (got < n) begin
      ks_ready = ($urandom % 100) >= stall_pct;
      busy_cycles++;
      #1;
      if (ks_valid && ks_ready) begin
        check(ks_word === exp_w[got], $sformatf("word %0d %08h exp %08h", got, ks_word, exp_w[got]));
        got++;
      end
      @(negedge clk);
    end
    ks_ready = 0;
    if (stall_pct == 0) check(busy_cycles == n, $sformatf("%0d words took %0d cycles", n, busy_cycles));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_w[$];
    logic [31:0] kw[4], ivw[4];
    snow3g_ref m;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Test set 1: k0 = 2BD6459F is the least significant key word.
    exp_w = '{32'hABEE9704, 32'h7AC31373};
    run({32'h4881FF48, 32'h952C4910, 32'h82C5B300, 32'h2BD6459F},
        {32'h1C0BF45F, 32'hDF1F9B25, 32'hAD5C4D84, 32'hEA024714}, 2, 0, exp_w);
    for (int r = 0; r < 6; r++) begin
      logic [127:0] k, v;
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 4; i++) begin
        kw[i] = k[32*i +: 32];
        ivw[i] = v[32*i +: 32];
      end
      m = new();
      m.init(kw, ivw);
      exp_w.delete();
      for (int i = 0; i < 200; i++) exp_w.push_back(m.next_word());
      run(k, v, (r == 5) ? 20 : 200, (r == 0) ? 0 : 40, exp_w);
    end
    // The last run stopped after 20 words; the restart above already showed
    // that start works mid-stream. Run test set 1 once more after it.
    exp_w = '{32'hABEE9704, 32'h7AC31373};
    run({32'h4881FF48, 32'h952C4910, 32'h82C5B300, 32'h2BD6459F},
        {32'h1C0BF45F, 32'hDF1F9B25, 32'hAD5C4D84, 32'hEA024714}, 2, 0, exp_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
