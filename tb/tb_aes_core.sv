// Testbench for aes_core.
//  * FIPS-197 known answers (appendix B and C.1).
//  * 12 clocks per block: out_valid must rise 12 cycles after the start edge.
//  * 200 random key/plaintext pairs against the reference AES, issued back
//    to back in the cycle out_valid is high, and with idle gaps.
//  * A start while the core is busy must be ignored.
module tb_aes_core;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [127:0] key, block_in, block_out;
  logic busy, out_valid;

  aes_core dut (.clk, .rst_n, .start, .key, .block_in, .busy, .out_valid, .block_out);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp_c,
                         input bit poke_busy);
    int cyc = 0;
    key = k;
    block_in = p;
    start = 1;
    @(negedge clk);
    start = 0;
    key = ~k;
    block_in = ~p;
    while (!out_valid) begin
      cyc++;
      if (poke_busy && cyc == 5) start = 1;     // must be ignored
      @(negedge clk);
      start = 0;
      if (cyc > 50) break;
    end
    check(cyc + 1 == 12, $sformatf("block took %0d cycles, expected 12", cyc + 1));
    check(block_out === exp_c, $sformatf("ct %h exp %h", block_out, exp_c));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    build_tables();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32, 0);
    for (int i = 0; i < 200; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      if (i % 2) repeat ($urandom % 3) @(negedge clk);
      encrypt(k, p, aes128(k, p), i % 7 == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
