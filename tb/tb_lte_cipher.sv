// End-to-end testbench for lte_cipher at its default parameters.
//
// Runs a sequence of PDUs through the accelerator, switching between
// 128-EEA1 and 128-EEA2, and checks every output word against the reference
// keystreams. It covers:
//  * the published 128-EEA1 and 128-EEA2 test set 1 (253 bits),
//  * a 1000-byte PDU in each algorithm without stalls, with its cycle count
//    (EEA1: 34 + 250 cycles; EEA2: 63 blocks at 12 cycles each, plus start-up),
//  * a maximum-length PDU (LENGTH = 65535 bits) in each algorithm,
//  * random PDUs with random input and output stalls.
// Each mechanism is counted and a failure is counted for any that never
// happened: algorithm switch, input stall, output stall, a finished AES block
// waiting for the keystream buffer, a masked partial last word, a start
// ignored while busy, a LENGTH = 0 request.
module tb_lte_cipher;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  alg_e alg = ALG_EEA1, last_alg = ALG_EEA1;
  cipher_params_t params;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, busy;
  logic [31:0] in_data = 0, out_data;
  int n_switch = 0, n_in_stall = 0, n_out_stall = 0, n_buf_wait = 0, n_partial = 0;
  int n_ignored = 0, n_zero = 0, n_pdu1 = 0, n_pdu2 = 0;

  lte_cipher dut (.clk, .rst_n, .start, .alg, .params, .in_valid, .in_ready, .in_data,
                  .out_valid, .out_ready, .out_data, .out_last, .busy);

  always #5 clk = ~clk;

  always @(posedge clk)
    if (dut.u_eea2.running_q && dut.u_eea2.slot_busy_q[dut.u_eea2.cons_idx_q] &&
        dut.u_eea2.core_done[dut.u_eea2.cons_idx_q] && !dut.u_eea2.buf_free)
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

  // One PDU through the top; checks against the reference and returns the
  // cycle of the last word counted from the start edge.
  task automatic run_pdu(input alg_e a, input cipher_params_t p, input int stall_pct,
                         output int last_cyc);
    int n = (p.length + 31) / 32;
    int idx = 0, cyc = 0, idle = 0;
    logic [31:0] data[$], ks[$], expw;
    for (int i = 0; i < n; i++) data.push_back($urandom);
    if (a == ALG_EEA1) eea1_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
    else               eea2_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
    if (a != last_alg) n_switch++;
    last_alg = a;
    if (a == ALG_EEA1) n_pdu1++; else n_pdu2++;
    last_cyc = -1;
    alg = a;
    params = p;
    start = 1;
    @(negedge clk);
    start = 0;
    params = '0;
    alg = alg_e'(~a);
    while (idx < n && idle < 5000) begin
      cyc++;
      in_valid = ($urandom % 100) >= stall_pct;
      out_ready = ($urandom % 100) >= stall_pct;
      in_data = data[idx];
      if (idx == 2 && cyc % 3 == 0) begin
        start = 1;                      // must be ignored while busy
        n_ignored++;
      end
      #1;
      if (busy && !in_valid) n_in_stall++;
      if (busy && in_valid && !out_ready) n_out_stall++;
      if (out_valid && out_ready) begin
        expw = (data[idx] ^ ks[idx]) & tail_mask(p.length, idx);
        check(out_data === expw, $sformatf("alg %0d len %0d word %0d %08h exp %08h",
                                           a, p.length, idx, out_data, expw));
        check(in_ready, "in_ready with transfer");
        check(out_last == (idx == n - 1), "out_last");
        if (idx == n - 1 && tail_mask(p.length, idx) != '1) n_partial++;
        last_cyc = cyc;
        idx++;
        idle = 0;
      end else begin
        idle++;
      end
      @(negedge clk);
      start = 0;
    end
    in_valid = 0;
    out_ready = 0;
    check(idx == n, $sformatf("PDU incomplete: %0d of %0d words", idx, n));
    check(!busy, "busy after the PDU");
  endtask

  function automatic cipher_params_t rand_params(input int len);
    cipher_params_t p;
    p.key = {$urandom, $urandom, $urandom, $urandom};
    p.count = $urandom;
    p.bearer = 5'($urandom);
    p.direction = 1'($urandom);
    p.length = 16'(len);
    return p;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cipher_params_t p;
    int l;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Published test set 1 for both algorithms (checked through the
    // reference model, which reproduces the published ciphertexts).
    p.key = 128'hD3C5D592327FB11C4035C6680AF8C6D1;
    p.count = 32'h398A59B4;
    p.bearer = 5'h15;
    p.direction = 1'b1;
    p.length = 16'd253;
    run_pdu(ALG_EEA1, p, 0, l);
    run_pdu(ALG_EEA2, p, 0, l);

    // 1000-byte PDUs without stalls, with their processing time.
    run_pdu(ALG_EEA1, rand_params(8000), 0, l);
    check(l == 34 + 249, $sformatf("EEA1 1000 bytes: last word at cycle %0d", l));
    $display("EEA1, 1000 bytes: %0d cycles", l);
    run_pdu(ALG_EEA2, rand_params(8000), 0, l);
    check(l == 14 + 12 * 62 + 1, $sformatf("EEA2 1000 bytes: last word at cycle %0d", l));
    $display("EEA2, 1000 bytes: %0d cycles", l);

    // LENGTH = 0.
    params = rand_params(0);
    alg = ALG_EEA2;
    start = 1;
    @(negedge clk);
    start = 0;
    n_zero++;
    check(!busy, "LENGTH 0 leaves the accelerator idle");

    // Maximum length.
    run_pdu(ALG_EEA2, rand_params(65535), 10, l);
    run_pdu(ALG_EEA1, rand_params(65535), 10, l);

    // Random traffic.
    for (int r = 0; r < 30; r++) begin
      run_pdu(alg_e'($urandom % 2), rand_params(1 + $urandom % 3000), (r % 4) * 20, l);
      repeat ($urandom % 3) @(negedge clk);
    end

    $display("PDUs EEA1 %0d EEA2 %0d, switches %0d, input stalls %0d, output stalls %0d",
             n_pdu1, n_pdu2, n_switch, n_in_stall, n_out_stall);
    $display("buffer waits %0d, partial last words %0d, ignored starts %0d, zero-length %0d",
             n_buf_wait, n_partial, n_ignored, n_zero);
    check(n_switch > 0, "algorithm switch never happened");
    check(n_in_stall > 0, "input stall never happened");
    check(n_out_stall > 0, "output stall never happened");
    check(n_buf_wait > 0, "keystream buffer wait never happened");
    check(n_partial > 0, "partial last word never happened");
    check(n_ignored > 0, "start while busy never happened");
    check(n_zero > 0, "zero-length PDU never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
