// alpha_unit_tb: feeds long runs of random, positively biased gammas (so the
// metrics wrap many times) and compares the unit's metrics every step with
// an unbounded-integer forward recursion taken mod 2^MW; also checks the
// all-zero start and that a disabled unit holds its metrics.
module alpha_unit_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first;
  gamma_vec_t gamma;
  metric_vec_t alpha_cur;
  alpha_unit dut (.*);
  int checks = 0, failures = 0, wraps = 0;
  longint ref_a [8];

  initial begin
    en = 0; first = 0; gamma = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      for (int t = 0; t < 400; t++) begin
        int g [16];
        longint nx [8];
        for (int i = 0; i < 16; i++) begin
          g[i] = $urandom_range(0, 300) - 60;
          gamma[i] = gamma_t'(g[i]);
        end
        first = (t == 0);
        en = 1;
        if (t == 0) for (int s = 0; s < 8; s++) ref_a[s] = 0;
        #1;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (alpha_cur[s] != metric_t'(ref_a[s])) begin
            failures++; $display("run %0d t %0d s %0d: %0d exp %0d", run, t, s, alpha_cur[s], metric_t'(ref_a[s]));
          end
        end
        for (int sp = 0; sp < 8; sp++) nx[sp] = -(64'sd1 << 40);
        for (int s = 0; s < 8; s++)
          for (int ab = 0; ab < 4; ab++) begin
            longint v;
            v = ref_a[s] + g[ab * 4 + ref_par(s, ab)];
            if (v > nx[ref_next(s, ab)]) nx[ref_next(s, ab)] = v;
          end
        if ((nx[0] >> MW) != (ref_a[0] >> MW)) wraps++;
        ref_a = nx;
        @(negedge clk);
        // a disabled cycle must hold the metrics
        if (t == 200) begin
          en = 0; first = 0;
          @(negedge clk);
        end
      end
    end
    checks++;
    if (wraps < 10) begin failures++; $display("metrics wrapped only %0d times", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
