// bmu_tb: drives random channel and a priori LLRs (including the extreme
// values) and compares all 16 branch metrics with the reference sum.
module bmu_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  step_in_t ch;
  ext_vec_t apri;
  gamma_vec_t gamma;
  bmu dut (.*);
  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 500; n++) begin
      int la [4];
      int c [4];
      for (int i = 0; i < 4; i++) begin
        c[i]  = (n < 2) ? (n == 0 ? 31 : -32) : $urandom_range(0, 63) - 32;
        la[i] = (n < 2) ? (n == 0 ? 0 : -128) : -int'($urandom_range(0, 128));
        apri[i] = ext_t'(la[i]);
      end
      ch = '{a: ch_t'(c[0]), b: ch_t'(c[1]), y: ch_t'(c[2]), w: ch_t'(c[3])};
      #1;
      for (int ab = 0; ab < 4; ab++)
        for (int yw = 0; yw < 4; yw++) begin
          checks++;
          if (int'(gamma[ab * 4 + yw]) != ref_gamma(la, c[0], c[1], c[2], c[3], ab, yw)) begin
            failures++;
            $display("gamma[%0d] %0d exp %0d", ab * 4 + yw, gamma[ab * 4 + yw],
                     ref_gamma(la, c[0], c[1], c[2], c[3], ab, yw));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
