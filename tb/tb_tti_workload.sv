// Workload testbench: one transmission time interval (1 ms) of LTE downlink
// data at 100, 200 and 300 Mbit/s, i.e. 100, 200 and 300 kbit, ciphered with
// 128-EEA1 and with 128-EEA2 by lte_cipher at its default parameters.
//
// The data of one interval is sent as PDUs of 1500 bytes (a typical IP
// packet; the last PDU takes the remainder), back to back, with both stream
// sides always ready. Every output word is checked against the reference
// keystreams. The clock count of each interval is checked against its
// bound: 128-EEA1 needs one clock per word plus its 34-clock start-up per
// PDU, 128-EEA2 12 clocks per 128-bit block plus its start-up per PDU.
// The clock frequency the interval needs (clocks / 1 ms) is printed.
module tb_tti_workload;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  alg_e alg = ALG_EEA1;
  cipher_params_t params;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last, busy;
  logic [31:0] in_data = 0, out_data;

  lte_cipher dut (.clk, .rst_n, .start, .alg, .params, .in_valid, .in_ready, .in_data,
                  .out_valid, .out_ready, .out_data, .out_last, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // One PDU, no stalls; returns the clocks from its start to its last word.
  task automatic run_pdu(input alg_e a, input int bits, output int clocks);
    int n = (bits + 31) / 32;
    int idx = 0, cyc = 0;
    logic [31:0] data[$], ks[$];
    cipher_params_t p;
    p.key = {$urandom, $urandom, $urandom, $urandom};
    p.count = $urandom;
    p.bearer = 5'($urandom);
    p.direction = 1'b1;
    p.length = 16'(bits);
    for (int i = 0; i < n; i++) data.push_back($urandom);
    if (a == ALG_EEA1) eea1_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
    else               eea2_keystream(p.key, p.count, p.bearer, p.direction, n, ks);
    alg = a;
    params = p;
    start = 1;
    @(negedge clk);
    start = 0;
    in_valid = 1;
    out_ready = 1;
    while (idx < n && cyc < 100000) begin
      cyc++;
      in_data = data[idx];
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== (data[idx] ^ ks[idx])) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d", idx);
        end
        idx++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    out_ready = 0;
    clocks = cyc + 1;          // including the start cycle
    check(idx == n, "PDU incomplete");
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rates[3] = '{100, 200, 300};
    alg_e a;
    int bytes_left, total, bound, npdu, c, b;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (rates[ri]) begin
      for (int ai = 0; ai < 2; ai++) begin
        a = alg_e'(ai);
        bytes_left = rates[ri] * 1000 / 8;
        total = 0;
        bound = 0;
        npdu = 0;
        while (bytes_left > 0) begin
          b = (bytes_left > 1500) ? 1500 : bytes_left;
          run_pdu(a, 8 * b, c);
          total += c;
          npdu++;
          bound += (a == ALG_EEA1) ? (34 + (b + 3) / 4 + 1) : (15 + 12 * ((b + 15) / 16) + 1);
          bytes_left -= b;
        end
        check(total <= bound, $sformatf("%0d kbit %s: %0d clocks, bound %0d", rates[ri],
                                        a == ALG_EEA1 ? "EEA1" : "EEA2", total, bound));
        $display("%0d kbit per TTI, %s: %0d PDUs, %0d clocks -> needs %0.1f MHz",
                 rates[ri], a == ALG_EEA1 ? "128-EEA1" : "128-EEA2", npdu, total,
                 real'(total) / 1000.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
