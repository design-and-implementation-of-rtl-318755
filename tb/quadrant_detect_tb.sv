// quadrant_detect_tb: builds vectors of eight metrics with a known spread
// (below three quadrants) around a random point of the wrapping range and
// checks that extending them with the detected rule restores their true
// differences; also checks the extension bit on hand-made vectors.
module quadrant_detect_tb;
  import turbo_pkg::*;
  metric_vec_t m;
  logic sign_ext;
  quadrant_detect dut (.*);
  int checks = 0, failures = 0;

  task automatic fixed(int q_a, int q_b, logic exp);
    for (int s = 0; s < 8; s++) m[s] = metric_t'(((s < 4 ? q_a : q_b) << (MW - 2)) + s);
    #1;
    checks++;
    if (sign_ext != exp) begin failures++; $display("quadrants %0d,%0d: ext %0d", q_a, q_b, sign_ext); end
  endtask

  initial begin
    fixed(1, 2, 1'b0);   // 01 and 10 occupied: zero extension
    fixed(3, 0, 1'b1);   // around zero: sign extension
    fixed(0, 1, 1'b1);
    fixed(2, 3, 1'b1);
    for (int n = 0; n < 2000; n++) begin
      int base, spread;
      int d [8];
      base = $urandom_range(0, (1 << MW) - 1);
      spread = $urandom_range(0, 3 * (1 << (MW - 2)) - 2 * (1 << (MW - 2)) / 2);
      for (int s = 0; s < 8; s++) begin
        d[s] = $urandom_range(0, spread);
        m[s] = metric_t'(base + d[s]);
      end
      #1;
      for (int s = 1; s < 8; s++) begin
        checks++;
        if (int'(metric_extend(m[s], sign_ext)) - int'(metric_extend(m[0], sign_ext)) != d[s] - d[0]) begin
          failures++;
          $display("base %0d d %0d/%0d ext %0d", base, d[s], d[0], sign_ext);
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
