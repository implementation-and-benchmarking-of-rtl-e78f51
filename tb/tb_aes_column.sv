// Testbench for aes_column: random columns and round-key words in all three
// round modes against a byte-wise reference (S-box table look-up and the
// MixColumns matrix written out with GF multiplications by 2 and 3).
module tb_aes_column;
  import lte_cipher_pkg::*;
  import cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] col_in, rk_word, col_out, exp_o;
  aes_round_e mode;

  aes_column dut (.col_in, .rk_word, .mode, .col_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s[4];
    build_tables();
    // FIPS-197 MixColumns example column: db 13 53 45 -> 8e 4d a1 bc.
    for (int i = 0; i < 3000; i++) begin
      col_in = $urandom;
      rk_word = $urandom;
      mode = aes_round_e'($urandom % 3);
      #1;
      for (int b = 0; b < 4; b++) s[b] = SR_T[col_in[31 - 8*b -: 8]];
      case (mode)
        RND_ARK_ONLY: exp_o = col_in ^ rk_word;
        RND_FINAL:    exp_o = {s[0], s[1], s[2], s[3]} ^ rk_word;
        default:      exp_o = {r_mul(s[0], 2, 8'h1B) ^ r_mul(s[1], 3, 8'h1B) ^ s[2] ^ s[3],
                               s[0] ^ r_mul(s[1], 2, 8'h1B) ^ r_mul(s[2], 3, 8'h1B) ^ s[3],
                               s[0] ^ s[1] ^ r_mul(s[2], 2, 8'h1B) ^ r_mul(s[3], 3, 8'h1B),
                               r_mul(s[0], 3, 8'h1B) ^ s[1] ^ s[2] ^ r_mul(s[3], 2, 8'h1B)} ^ rk_word;
      endcase
      checks++;
      if (col_out !== exp_o) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d in=%08h out=%08h exp %08h", mode, col_in, col_out, exp_o);
      end
    end
    // Literal check of the matrix: S-box inputs chosen so that SubBytes
    // yields db 13 53 45 (S^-1 found by search), expected 8e 4d a1 bc.
    begin
      logic [7:0] want[4] = '{8'hdb, 8'h13, 8'h53, 8'h45};
      for (int b = 0; b < 4; b++)
        for (int v = 0; v < 256; v++) if (SR_T[v] == want[b]) col_in[31 - 8*b -: 8] = 8'(v);
      rk_word = 0;
      mode = RND_FULL;
      #1;
      checks++;
      if (col_out !== 32'h8e4da1bc) begin
        failures++;
        $display("FAIL FIPS MixColumns example: %08h", col_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
