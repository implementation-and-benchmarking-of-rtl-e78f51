// Testbench for eea2 (128-EEA2, AES-128 counter mode) with NUM_AES = 2.
//  * Known answer: 128-EEA2 test set 1 of the LTE specification (253 bits,
//    COUNT 398A59B4, BEARER 15, DIRECTION 1), tail bits forced to zero.
//  * Timing without stalls: first word 14 cycles after start; then one
//    128-bit keystream block every 6 clocks (12 clocks per AES core).
//  * Random PDUs (LENGTH 1..4000 bits) with random input and output stalls
//    against the reference AES-CTR keystream; out_last checked per word.
//  * Counts how often a finished block had to wait for a full keystream
//    buffer, and fails if that never happened.
module tb_eea2_dual;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  cipher_params_t params;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, busy;
  logic [31:0] in_data = 0, out_data;
  int n_buf_wait = 0;

  eea2 #(.NUM_AES(2)) dut (.clk, .rst_n, .start, .params, .in_valid, .in_ready, .in_data,
                           .out_valid, .out_ready, .out_data, .out_last, .busy);

  always #5 clk = ~clk;

  // A finished block that cannot enter the full keystream buffer.
  always @(posedge clk)
    if (dut.running_q && dut.slot_busy_q[dut.cons_idx_q] && dut.core_done[dut.cons_idx_q] &&
        !dut.buf_free)
      n_buf_wait++;

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
    params.length = 16'hFFFF;
    while (idx < n && cyc < 40000) begin
      cyc++;
      in_valid = ($urandom % 100) >= stall_pct;
      out_ready = ($urandom % 100) >= stall_pct;
      in_data = data[idx];
      if (idx == 3 && cyc % 5 == 0) start = 1;   // ignored while busy
      #1;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cipher_params_t p;
    logic [31:0] data[$], res[$], ks[$];
    int f, l, n, nb;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    p.key = 128'hD3C5D592327FB11C4035C6680AF8C6D1;
    p.count = 32'h398A59B4;
    p.bearer = 5'h15;
    p.direction = 1'b1;
    p.length = 16'd253;
    data = '{32'h981BA682, 32'h4C1BFB1A, 32'hB4854720, 32'h29B71D80,
             32'h8CE33E2C, 32'hC3C0B5FC, 32'h1F3DE8A6, 32'hDC66B1F7};
    run_pdu(p, data, 0, res, f, l);
    begin
      logic [31:0] ct[8] = '{32'hE9FED8A6, 32'h3D155304, 32'hD71DF20B, 32'hF3E82214,
                             32'hB20ED7DA, 32'hD2F233DC, 32'h3C22D7BD, 32'hEEED8E78};
      for (int i = 0; i < 8; i++)
        check(res[i] === ct[i], $sformatf("test set 1 word %0d %08h exp %08h", i, res[i], ct[i]));
    end
    check(f == 14, $sformatf("first word at cycle %0d, expected 14", f));

    // Throughput: 40 blocks without stalls.
    p.length = 16'(40 * 128);
    data.delete();
    for (int i = 0; i < 160; i++) data.push_back($urandom);
    eea2_keystream(p.key, p.count, p.bearer, p.direction, 160, ks);
    run_pdu(p, data, 0, res, f, l);
    for (int i = 0; i < 160; i++) check(res[i] === (data[i] ^ ks[i]), $sformatf("long pdu word %0d", i));
    $display("40 blocks: first word %0d, last word %0d", f, l);
    check(l - f <= 6 * 39 + 3 + 6 && l - f >= 6 * 39 + 3 - 6,
          $sformatf("40 blocks took %0d cycles from first to last word", l - f));

    p.length = 0;
    params = p;
    start = 1;
    @(negedge clk);
    start = 0;
    check(!busy, "LENGTH 0 leaves the engine idle");

    for (int r = 0; r < 25; r++) begin
      p.key = {$urandom, $urandom, $urandom, $urandom};
      p.count = $urandom;
      p.bearer = 5'($urandom);
      p.direction = 1'($urandom);
      p.length = 16'(1 + $urandom % 4000);
      n = (p.length + 31) / 32;
      data.delete();
      for (int i = 0; i < n; i++) data.push_back($urandom);
      eea2_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
      run_pdu(p, data, (r % 3) * 30, res, f, l);
      for (int i = 0; i < n && i < res.size(); i++)
        check(res[i] === ((data[i] ^ ks[i]) & tail_mask(p.length, i)),
              $sformatf("pdu %0d word %0d %08h exp %08h", r, i, res[i],
                        (data[i] ^ ks[i]) & tail_mask(p.length, i)));
      repeat ($urandom % 4) @(negedge clk);
    end
    check(n_buf_wait > 0, "a finished block never waited for the buffer");
    $display("cycles a finished block waited for the buffer: %0d", n_buf_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
