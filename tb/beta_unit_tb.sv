// beta_unit_tb: feeds long runs of random, positively biased gammas (so the
// metrics wrap many times) and compares the unit's metrics every step with
// an unbounded-integer backward recursion taken mod 2^MW; also checks the
// all-zero start and that a disabled unit holds its metrics.
module beta_unit_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, first;
  gamma_vec_t gamma;
  metric_vec_t beta_cur;
  beta_unit dut (.*);
  int checks = 0, failures = 0, wraps = 0;
  longint ref_b [8];

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
        if (t == 0) for (int s = 0; s < 8; s++) ref_b[s] = 0;
        #1;
        for (int s = 0; s < 8; s++) begin
          checks++;
          if (beta_cur[s] != metric_t'(ref_b[s])) begin
            failures++; $display("run %0d t %0d s %0d: %0d exp %0d", run, t, s, beta_cur[s], metric_t'(ref_b[s]));
          end
        end
        for (int s = 0; s < 8; s++) begin
          nx[s] = -(64'sd1 << 40);
          for (int ab = 0; ab < 4; ab++) begin
            longint v;
            v = ref_b[ref_next(s, ab)] + g[ab * 4 + ref_par(s, ab)];
            if (v > nx[s]) nx[s] = v;
          end
        end
        if ((nx[0] >> MW) != (ref_b[0] >> MW)) wraps++;
        ref_b = nx;
        @(negedge clk);
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
