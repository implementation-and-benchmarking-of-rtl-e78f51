// Testbench for snow3g_s2: 4000 random words and the byte-wise corner words
// against the reference 32-bit S-box.
module tb_snow3g_s2;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] w, y, exp_y;

  snow3g_s2 dut (.w, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_tables();
    for (int i = 0; i < 4256; i++) begin
      w = (i < 256) ? {4{8'(i)}} : $urandom;
      #1;
      exp_y = r_s32(w, 1);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL w=%08h y=%08h exp %08h", w, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
