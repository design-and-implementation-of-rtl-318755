// turbo_decoder_top_tb: end-to-end test of the decoder at its default
// parameters (4 PEs, 600 couples per bank, window 10).
//
// For each block: random couples are encoded by both component encoders
// (the second on the CTC-interleaved, A/B-swapped sequence), mapped to
// channel LLRs with bounded random noise, streamed in, decoded, and the
// streamed-out decisions and extrinsic LLRs are compared with a reference
// turbo decoder built from the windowed max-log-MAP model, run per
// sub-block exactly as the PEs split the block. The decisions are also
// compared with the transmitted data (bit errors are reported; the clean
// block must have none). The decode time is checked against
// 2 * n_iter * (K + 3L + 6) cycles. Counted mechanisms, each of which must
// occur: A/B swaps, non-zero bank rotation, inverse-table lookups, beta
// training runs, trained-free last windows, both beta units, zero-extended
// (wrapped) alpha vectors, full iterations.
module turbo_decoder_top_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int NPE = 4;
  localparam int L   = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_ready, out_valid, busy, done;
  logic [11:0] n_len, p0, p1, p2, p3;
  logic [3:0] n_iter;
  chan_rec_t in_rec;
  logic [1:0] out_dec;
  ext_vec_t out_llr;
  logic qpp_start, qpp_en;
  logic [12:0] qpp_n, qpp_f1, qpp_f2, qpp_addr, qpp_index;

  turbo_decoder_top dut (.*);

  int checks = 0, failures = 0;
  int cnt_swap = 0, cnt_rot = 0, cnt_inv = 0, cnt_train = 0, cnt_lastwin = 0;
  int cnt_beta0 = 0, cnt_beta1 = 0, cnt_wrap = 0, cnt_iter = 0;

  // mechanism counters (PE 0 and the interleaver are representative)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_il.step_en && dut.half2 && dut.fwd_swap) cnt_swap++;
    if (dut.u_il.step_en && dut.fwd_bank[0] != 0) cnt_rot++;
    if (dut.u_il.step_en && !dut.half2 && dut.state == dut.S_HRUN) cnt_inv++;
    if (dut.g_pe[0].u_pe.train_v && dut.g_pe[0].u_pe.train_first) cnt_train++;
    if (dut.g_pe[0].u_pe.prod_v && dut.g_pe[0].u_pe.prod_first) cnt_lastwin++;
    if (dut.g_pe[0].u_pe.b_en[0]) cnt_beta0++;
    if (dut.g_pe[0].u_pe.b_en[1]) cnt_beta1++;
    if (dut.g_pe[0].u_pe.alpha_en && !dut.g_pe[0].u_pe.u_amem.w_ext) cnt_wrap++;
    if (dut.state == dut.S_HRUN && dut.pe_done[0] && dut.half2) cnt_iter++;
  end

  function automatic int clampch(int v);
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  function automatic int swap2(int ab);
    return ((ab & 1) << 1) | ((ab >> 1) & 1);
  endfunction

  task automatic run_block(int n, int q0, int q1, int q2, int q3, int iters, int amp, int noise);
    int k, cyc, t_dec, errs;
    int u [];
    int u2 [];
    int yw1 [];
    int yw2 [];
    int rec [][6];
    int ld [][4];
    int li [][4];
    int dec [];
    int inv [];
    k = n / NPE;
    u = new[n]; u2 = new[n]; rec = new[n]; ld = new[n]; li = new[n]; dec = new[n]; inv = new[n];
    foreach (u[i]) u[i] = $urandom_range(0, 3);
    for (int j = 0; j < n; j++) begin
      int i;
      i = ref_arp(j, n, q0, q1, q2, q3);
      inv[i] = j;
      u2[j] = (i % 2 == 0) ? swap2(u[i]) : u[i];
    end
    ref_encode(u, yw1);
    ref_encode(u2, yw2);
    for (int i = 0; i < n; i++) begin
      int bits [6];
      bits = '{(u[i] >> 1) & 1, u[i] & 1, (yw1[i] >> 1) & 1, yw1[i] & 1, (yw2[i] >> 1) & 1, yw2[i] & 1};
      for (int b = 0; b < 6; b++)
        rec[i][b] = clampch((bits[b] ? amp : -amp) + $urandom_range(0, 2 * noise) - noise);
    end

    // reference turbo decoder
    foreach (ld[i]) ld[i] = '{0, 0, 0, 0};
    for (int it = 0; it < iters; it++) begin
      for (int p = 0; p < NPE; p++) begin
        int ch [][4];
        int la [][4];
        int ex [][4];
        int dd [];
        ch = new[k]; la = new[k];
        for (int s = 0; s < k; s++) begin
          int i;
          i = p * k + s;
          ch[s] = '{rec[i][0], rec[i][1], rec[i][2], rec[i][3]};
          la[s] = ld[i];
        end
        ref_map(ch, la, k, L, ex, dd);
        for (int s = 0; s < k; s++) begin
          int i;
          i = p * k + s;
          li[inv[i]] = (i % 2 == 0) ? '{ex[s][0], ex[s][2], ex[s][1], ex[s][3]} : ex[s];
        end
      end
      for (int m = 0; m < NPE; m++) begin
        int ch [][4];
        int la [][4];
        int ex [][4];
        int dd [];
        ch = new[k]; la = new[k];
        for (int s = 0; s < k; s++) begin
          int j, i;
          j = m * k + s;
          i = ref_arp(j, n, q0, q1, q2, q3);
          ch[s] = (i % 2 == 0) ? '{rec[i][1], rec[i][0], rec[j][4], rec[j][5]}
                               : '{rec[i][0], rec[i][1], rec[j][4], rec[j][5]};
          la[s] = li[j];
        end
        ref_map(ch, la, k, L, ex, dd);
        for (int s = 0; s < k; s++) begin
          int j, i;
          j = m * k + s;
          i = ref_arp(j, n, q0, q1, q2, q3);
          ld[i]  = (i % 2 == 0) ? '{ex[s][0], ex[s][2], ex[s][1], ex[s][3]} : ex[s];
          dec[i] = (i % 2 == 0) ? swap2(dd[s]) : dd[s];
        end
      end
    end

    // run the hardware
    @(negedge clk);
    n_len = 12'(n); p0 = 12'(q0); p1 = 12'(q1); p2 = 12'(q2); p3 = 12'(q3);
    n_iter = 4'(iters);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < n; i++) begin
      in_rec = '{a: ch_t'(rec[i][0]), b: ch_t'(rec[i][1]), y1: ch_t'(rec[i][2]),
                 w1: ch_t'(rec[i][3]), y2: ch_t'(rec[i][4]), w2: ch_t'(rec[i][5])};
      in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("not ready at %0d", i); end
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    t_dec = -1;
    while (!out_valid && cyc < 200000) begin
      if (dut.state == dut.S_HSTART && t_dec < 0) t_dec = cyc;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc - t_dec != 2 * iters * (k + 3 * L + 6)) begin
      failures++; $display("decode took %0d cycles, expected %0d", cyc - t_dec, 2 * iters * (k + 3 * L + 6));
    end
    errs = 0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (!out_valid) begin failures++; $display("output gap at %0d", i); end
      if (int'(out_dec) != dec[i]) begin
        failures++;
        if (failures < 10) $display("couple %0d dec %0d ref %0d", i, out_dec, dec[i]);
      end
      for (int a = 0; a < 4; a++) if (int'(out_llr[a]) != ld[i][a]) begin
        failures++;
        if (failures < 10) $display("couple %0d llr[%0d] %0d ref %0d", i, a, out_llr[a], ld[i][a]);
      end
      if (int'(out_dec) != u[i]) errs++;
      @(negedge clk);
    end
    checks++;
    if (out_valid || busy) begin failures++; $display("still busy after output"); end
    $display("N=%0d iterations=%0d amp=%0d noise=%0d: %0d couple errors, decode %0d cycles",
             n, iters, amp, noise, errs, cyc - t_dec);
    if (noise == 0) begin
      checks++;
      if (errs != 0) failures++;
    end
  endtask

  initial begin
    {start, in_valid, qpp_start, qpp_en} = '0;
    {n_len, p0, p1, p2, p3} = '0;
    n_iter = 0; in_rec = '0; qpp_n = 0; qpp_f1 = 0; qpp_f2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(240, 13, 4, 8, 12, 2, 20, 0);        // clean
    run_block(2400, 53, 62, 12, 2, 4, 12, 18);     // largest block, noisy
    run_block(480, 31, 8, 4, 16, 1, 12, 18);       // noisy, one iteration
    // LTE QPP generator beside the decoder: a few addresses of N=40
    qpp_n = 13'd40; qpp_f1 = 13'd3; qpp_f2 = 13'd10;
    qpp_start = 1; @(negedge clk); qpp_start = 0;
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (int'(qpp_addr) != (3 * i + 10 * i * i) % 40) failures++;
      qpp_en = 1; @(negedge clk); qpp_en = 0;
    end
    $display("mechanisms: swap=%0d rotation=%0d inverse=%0d training=%0d last_window=%0d beta0=%0d beta1=%0d wrap=%0d iterations=%0d",
             cnt_swap, cnt_rot, cnt_inv, cnt_train, cnt_lastwin, cnt_beta0, cnt_beta1, cnt_wrap, cnt_iter);
    checks += 9;
    if (cnt_swap == 0) failures++;
    if (cnt_rot == 0) failures++;
    if (cnt_inv == 0) failures++;
    if (cnt_train == 0) failures++;
    if (cnt_lastwin == 0) failures++;
    if (cnt_beta0 == 0) failures++;
    if (cnt_beta1 == 0) failures++;
    if (cnt_wrap == 0) failures++;
    if (cnt_iter != 7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
