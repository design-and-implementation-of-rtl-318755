// llr_unit_tb: streams random steps (extended alpha, wrapping beta with a
// known true value, random gammas) into the LLR unit one per cycle, and
// checks each output against the max-log-MAP symbol LLR computed from the
// true metrics: extrinsic = max over branches minus the a priori and
// systematic part, scaled by the largest, saturated; hard decision =
// argmax. Also checks the 4-cycle latency and tag passing.
module llr_unit_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  metric_ext_t alpha [NSTATE];
  metric_vec_t beta;
  gamma_vec_t gamma;
  logic [12:0] in_tag, out_tag;
  ext_vec_t out_ext;
  logic [1:0] out_dec;
  llr_unit dut (.*);
  int checks = 0, failures = 0;
  int exp_ext [int][4];
  int exp_dec [int];
  int sent_at [int];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int t;
    t = int'(out_tag);
    checks++;
    if (!exp_dec.exists(t)) begin failures++; $display("unknown tag %0d", t); end
    else begin
      if (cyc - sent_at[t] != 4) begin failures++; $display("tag %0d latency %0d", t, cyc - sent_at[t]); end
      if (int'(out_dec) != exp_dec[t]) begin failures++; $display("tag %0d dec %0d exp %0d", t, out_dec, exp_dec[t]); end
      for (int i = 0; i < 4; i++) if (int'(out_ext[i]) != exp_ext[t][i]) begin
        failures++; $display("tag %0d ext[%0d] %0d exp %0d", t, i, out_ext[i], exp_ext[t][i]);
      end
    end
  end

  initial begin
    in_valid = 0; beta = '0; gamma = '0; in_tag = '0;
    for (int s = 0; s < 8; s++) alpha[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int a [8], b [8], g [16], lam [4], e [4], emax, lmax, d, abase, bbase, spread;
      spread = (n % 3 == 0) ? 40 : 1500;
      abase = $urandom_range(0, 2000) - 1000;
      bbase = $urandom_range(0, (1 << MW) - 1);
      for (int s = 0; s < 8; s++) begin
        a[s] = $urandom_range(0, spread);
        b[s] = $urandom_range(0, spread);
        alpha[s] = metric_ext_t'(abase + a[s]);
        beta[s] = metric_t'(bbase + b[s]);
      end
      for (int i = 0; i < 16; i++) begin
        g[i] = $urandom_range(0, 380) - 256;
        gamma[i] = gamma_t'(g[i]);
      end
      for (int ab = 0; ab < 4; ab++) begin
        lam[ab] = -(1 << 30);
        for (int s = 0; s < 8; s++) begin
          int v;
          v = a[s] + g[ab * 4 + ref_par(s, ab)] + b[ref_next(s, ab)];
          if (v > lam[ab]) lam[ab] = v;
        end
        e[ab] = lam[ab] - g[ab * 4];
      end
      emax = e[0]; lmax = lam[0]; d = 0;
      for (int ab = 1; ab < 4; ab++) begin
        if (e[ab] > emax) emax = e[ab];
        if (lam[ab] > lmax) begin lmax = lam[ab]; d = ab; end
      end
      for (int ab = 0; ab < 4; ab++) exp_ext[n][ab] = (e[ab] - emax < -128) ? -128 : e[ab] - emax;
      exp_dec[n] = d;
      sent_at[n] = cyc + 1;
      in_tag = 13'(n);
      in_valid = ($urandom_range(0, 3) != 0);
      if (!in_valid) begin exp_dec.delete(n); end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (checks < 600) failures++;
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
