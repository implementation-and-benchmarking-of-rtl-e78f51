// Testbench for onehot_sbox: all 256 inputs of both the S_R and the S_Q
// configuration against the reference tables (S_R(0) = 0x63 and
// S_Q(0) = 0x25 are also checked as literal values).
module tb_onehot_sbox;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] x, y_sr, y_sq;

  onehot_sbox #(.KIND(SBOX_SR)) u_sr (.x, .y(y_sr));
  onehot_sbox #(.KIND(SBOX_SQ)) u_sq (.x, .y(y_sq));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

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
      x = 8'(i);
      #1;
      check(y_sr == SR_T[i], $sformatf("SR(%02h)=%02h exp %02h", i, y_sr, SR_T[i]));
      check(y_sq == SQ_T[i], $sformatf("SQ(%02h)=%02h exp %02h", i, y_sq, SQ_T[i]));
      if (i == 0) begin
        check(y_sr == 8'h63, "SR(0) literal");
        check(y_sq == 8'h25, "SQ(0) literal");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
