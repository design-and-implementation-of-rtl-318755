// parallel_interleaver_tb: for several block sizes, steps through a whole
// sub-block and checks every PE's forward address and swap flag against the
// CTC interleaver formula, then checks the inverse addresses recorded in the
// deinterleaving table (P(inverse) must give back the PE's natural couple),
// and the setup time bound.
module parallel_interleaver_tb;
  import turbo_ref_pkg::*;

  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic setup, ready, restart, step_en, record;
  logic [11:0] n_len, p0, p1, p2, p3;
  logic [9:0] k_len, step, fwd_bit, inv_bit;
  logic [1:0] fwd_bank [NPE];
  logic [1:0] inv_bank [NPE];
  logic fwd_swap;

  parallel_interleaver dut (.*);

  int checks = 0, failures = 0;

  task automatic run(int n, int q0, int q1, int q2, int q3);
    int k, cyc;
    k = n / NPE;
    @(negedge clk);
    n_len = 12'(n); k_len = 10'(k);
    p0 = 12'(q0); p1 = 12'(q1); p2 = 12'(q2); p3 = 12'(q3);
    setup = 1;
    @(negedge clk);
    setup = 0;
    cyc = 0;
    while (!ready && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 5 * NPE + 2) begin failures++; $display("setup took %0d", cyc); end
    restart = 1; @(negedge clk); restart = 0;
    record = 1;
    for (int s = 0; s < k; s++) begin
      checks++;
      if (int'(step) != s) begin failures++; $display("step %0d exp %0d", step, s); end
      for (int m = 0; m < NPE; m++) begin
        int exp_a, got;
        exp_a = ref_arp(m * k + s, n, q0, q1, q2, q3);
        got = int'(fwd_bank[m]) * k + int'(fwd_bit);
        checks++;
        if (got != exp_a) begin
          failures++; $display("N=%0d j=%0d addr %0d exp %0d", n, m * k + s, got, exp_a);
        end
      end
      checks++;
      if (fwd_swap != ((ref_arp(s, n, q0, q1, q2, q3) % 2) == 0)) begin
        failures++; $display("swap at %0d", s);
      end
      step_en = 1; @(negedge clk); step_en = 0;
    end
    record = 0;
    restart = 1; @(negedge clk); restart = 0;
    for (int s = 0; s < k; s++) begin
      for (int p = 0; p < NPE; p++) begin
        int j;
        j = int'(inv_bank[p]) * k + int'(inv_bit);
        checks++;
        if (ref_arp(j, n, q0, q1, q2, q3) != p * k + s) begin
          failures++; $display("N=%0d inverse of %0d gave %0d", n, p * k + s, j);
        end
      end
      step_en = 1; @(negedge clk); step_en = 0;
    end
  endtask

  initial begin
    {setup, restart, step_en, record} = '0;
    {n_len, p0, p1, p2, p3, k_len} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2400, 53, 62, 12, 2);
    run(240, 13, 4, 8, 12);
    run(48, 5, 0, 0, 0);
    run(240, 11, 4, 8, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
