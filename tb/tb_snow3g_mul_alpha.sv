// Testbench for snow3g_mul_alpha: all 256 table entries against the
// reference map built by repeated multiplication by x mod 0x1A9.
module tb_snow3g_mul_alpha;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  c;
  logic [31:0] y;

  snow3g_mul_alpha dut (.c, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    for (int i = 0; i < 256; i++) begin
      c = 8'(i);
      #1;
      checks++;
      if (y !== MA_T[i]) begin
        failures++;
        $display("FAIL c=%02h y=%08h exp %08h", i, y, MA_T[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
