// Testbench for eea1 (128-EEA1 on a 32-bit word stream).
//  * Known answer: 128-EEA1 test set 1 of the LTE specification (253 bits,
//    COUNT 398A59B4, BEARER 15, DIRECTION 1); the three bits after bit 253
//    must come out as zero.
//  * Timing: with both stream sides always ready, the first word moves 34
//    cycles after start and then one word per clock.
//  * Random PDUs (random key, COUNT, BEARER, DIRECTION, LENGTH 1..2000 bits)
//    with random stalls on the input and the output side, against the
//    reference keystream; the tail mask and out_last are checked per word.
//  * LENGTH = 0 finishes without producing a word; start while busy is ignored.
module tb_eea1;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  cipher_params_t params;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, busy;
  logic [31:0] in_data = 0, out_data;
  int n_in_stall = 0, n_out_stall = 0;

  eea1 dut (.clk, .rst_n, .start, .params, .in_valid, .in_ready, .in_data,
            .out_valid, .out_ready, .out_data, .out_last, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] tail_mask(input int len, input int idx);
    int rem = len - 32 * idx;
    if (rem >= 32) return '1;
    return ~(32'hFFFF_FFFF >> rem);
  endfunction

  // Run one PDU; returns the cycles from start to the first and last word.
  task automatic run_pdu(input cipher_params_t p, input logic [31:0] data[$],
                         input int stall_pct, ref logic [31:0] res[$],
                         output int first_cyc, output int last_cyc);
    int n = (p.length + 31) / 32;
    int idx = 0, cyc = 0;
    res.delete();
    first_cyc = -1;
    last_cyc = -1;
    params = p;
    start = 1;
    @(negedge clk);
    start = 0;
    params = '0;
    params.length = 16'hFFFF;     // ignored after the start cycle
    while (idx < n && cyc < 20000) begin
      cyc++;
      in_valid = ($urandom % 100) >= stall_pct;
      out_ready = ($urandom % 100) >= stall_pct;
      in_data = data[idx];
      if (idx == 3 && cyc % 5 == 0) start = 1;   // ignored while busy
      #1;
      if (!in_valid && out_ready && dut.ks_valid) n_in_stall++;
      if (in_valid && !out_ready && dut.ks_valid) n_out_stall++;
      if (out_valid && out_ready) begin
        check(in_ready, "in_ready with transfer");
        res.push_back(out_data);
        check(out_last == (idx == n - 1), $sformatf("out_last at word %0d", idx));
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        idx++;
      end
      @(negedge clk);
      start = 0;
    end
    in_valid = 0;
    out_ready = 0;
    check(idx == n, $sformatf("PDU incomplete: %0d of %0d words", idx, n));
    check(!busy, "busy after last word");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cipher_params_t p;
    logic [31:0] data[$], res[$], ks[$];
    int f, l, n;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 128-EEA1 test set 1.
    p.key = 128'hD3C5D592327FB11C4035C6680AF8C6D1;
    p.count = 32'h398A59B4;
    p.bearer = 5'h15;
    p.direction = 1'b1;
    p.length = 16'd253;
    data = '{32'h981BA682, 32'h4C1BFB1A, 32'hB4854720, 32'h29B71D80,
             32'h8CE33E2C, 32'hC3C0B5FC, 32'h1F3DE8A6, 32'hDC66B1F7};
    run_pdu(p, data, 0, res, f, l);
    begin
      logic [31:0] ct[8] = '{32'h5D5BFE75, 32'hEB04F68C, 32'hE0A12377, 32'hEA00B37D,
                             32'h47C6A0BA, 32'h06309155, 32'h086A859C, 32'h4341B378};
      for (int i = 0; i < 8; i++)
        check(res[i] === ct[i], $sformatf("test set 1 word %0d %08h exp %08h", i, res[i], ct[i]));
    end
    check(f == 34, $sformatf("first word at cycle %0d, expected 34", f));
    check(l - f == 7, $sformatf("8 words took %0d cycles", l - f + 1));

    // LENGTH = 0.
    p.length = 0;
    params = p;
    start = 1;
    @(negedge clk);
    start = 0;
    check(!busy, "LENGTH 0 leaves the engine idle");

    // Random PDUs.
    for (int r = 0; r < 25; r++) begin
      p.key = {$urandom, $urandom, $urandom, $urandom};
      p.count = $urandom;
      p.bearer = 5'($urandom);
      p.direction = 1'($urandom);
      p.length = 16'(1 + $urandom % 2000);
      n = (p.length + 31) / 32;
      data.delete();
      for (int i = 0; i < n; i++) data.push_back($urandom);
      eea1_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
      run_pdu(p, data, (r % 3) * 25, res, f, l);
      for (int i = 0; i < n && i < res.size(); i++)
        check(res[i] === ((data[i] ^ ks[i]) & tail_mask(p.length, i)),
              $sformatf("pdu %0d word %0d %08h exp %08h", r, i, res[i],
                        (data[i] ^ ks[i]) & tail_mask(p.length, i)));
      if (r % 3 == 0) check(l - f == n - 1, "one word per clock without stalls");
      repeat ($urandom % 4) @(negedge clk);
    end
    check(n_in_stall > 0, "input stall never exercised");
    check(n_out_stall > 0, "output stall never exercised");
    $display("input stalls %0d, output stalls %0d", n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
