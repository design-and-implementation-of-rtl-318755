// turbo_decoder_ber_tb: bit error rate of the decoder at its default
// parameters on a BPSK / AWGN channel, for 2 and 4 iterations at Eb/N0 of
// 0.5 to 2.0 dB (rate 1/3, no puncturing), next to the error rate of the
// same bits sent uncoded by BPSK at the same Eb/N0.
//
// Each point decodes BLOCKS blocks of 2400 couples (4800 bits). Channel
// samples y = +-1 + n, n Gaussian (Box-Muller) with variance
// 1 / (2 * R * Eb/N0); the decoder gets round(QSCALE * y) clamped to 6
// bits. The uncoded rate uses separate noise of variance 1 / (2 * Eb/N0).
// All random draws use $urandom, so a run is repeatable. Checks (statistical,
// with margin): at every point 4 iterations make no more errors than 2
// iterations plus a small slack; from 1.0 dB on the 4-iteration error rate
// is at most a tenth of the uncoded one; the 2-iteration error rate falls as
// Eb/N0 rises and the 4-iteration one does not rise by more than 10 errors
// (at 1.5 to 2.0 dB it is a few errors per point, at the level of the floor).
// The channel, SNR range, block size and iteration counts follow the
// published BER figure of this decoder architecture; QSCALE, the block count
// and the check margins are choices of this testbench.
module turbo_decoder_ber_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int N      = 2400;
  localparam int BLOCKS = 20;
  localparam real QSCALE = 6.0;
  localparam int NPTS   = 4;

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
  real pi = 3.14159265358979;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * pi * u2);
  endfunction

  function automatic int quant(real y);
    int v;
    v = $rtoi(y * QSCALE + (y >= 0 ? 0.5 : -0.5));
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  // decode one block, return the number of wrong bits
  task automatic decode(int rec [][6], int u [], int iters, output int errs);
    @(negedge clk);
    n_len = 12'(N); p0 = 12'd53; p1 = 12'd62; p2 = 12'd12; p3 = 12'd2;
    n_iter = 4'(iters);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < N; i++) begin
      in_rec = '{a: ch_t'(rec[i][0]), b: ch_t'(rec[i][1]), y1: ch_t'(rec[i][2]),
                 w1: ch_t'(rec[i][3]), y2: ch_t'(rec[i][4]), w2: ch_t'(rec[i][5])};
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    errs = 0;
    for (int i = 0; i < N; i++) begin
      errs += int'(out_dec[1] != u[i][1]) + int'(out_dec[0] != u[i][0]);
      @(negedge clk);
    end
  endtask

  real snr_db [NPTS] = '{0.5, 1.0, 1.5, 2.0};
  int e2 [NPTS];
  int e4 [NPTS];
  int eu [NPTS];

  initial begin
    {start, in_valid, qpp_start, qpp_en} = '0;
    {n_len, p0, p1, p2, p3} = '0;
    n_iter = 0; in_rec = '0; qpp_n = 0; qpp_f1 = 0; qpp_f2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pt = 0; pt < NPTS; pt++) begin
      real ebn0, sigma, sigma_u;
      ebn0 = 10.0 ** (snr_db[pt] / 10.0);
      sigma = $sqrt(1.0 / (2.0 * ebn0 / 3.0));
      sigma_u = $sqrt(1.0 / (2.0 * ebn0));
      e2[pt] = 0; e4[pt] = 0; eu[pt] = 0;
      for (int b = 0; b < BLOCKS; b++) begin
        int u [];
        int rec [][6];
        int clean [][6];
        int errs;
        // noiseless block gives the code bits; add noise here
        ref_make_block(N, 53, 62, 12, 2, 1, 0, u, clean);
        rec = new[N];
        for (int i = 0; i < N; i++)
          for (int k = 0; k < 6; k++) begin
            rec[i][k] = quant(real'(clean[i][k]) + sigma * gauss());
            // the same bits sent uncoded at the same Eb/N0
            if (k < 2 && ((real'(clean[i][k]) + sigma_u * gauss() > 0.0) != (clean[i][k] > 0)))
              eu[pt]++;
          end
        decode(rec, u, 2, errs);
        e2[pt] += errs;
        decode(rec, u, 4, errs);
        e4[pt] += errs;
      end
      $display("Eb/N0 %.1f dB: uncoded BER %.2e, 2 iterations %.2e, 4 iterations %.2e (%0d bits)",
               snr_db[pt], real'(eu[pt]) / (2.0 * N * BLOCKS), real'(e2[pt]) / (2.0 * N * BLOCKS),
               real'(e4[pt]) / (2.0 * N * BLOCKS), 2 * N * BLOCKS);
    end
    for (int pt = 0; pt < NPTS; pt++) begin
      checks++;
      if (e4[pt] > e2[pt] + 10) begin failures++; $display("4 iterations worse at point %0d", pt); end
      if (pt >= 1) begin
        checks++;
        if (e4[pt] * 10 > eu[pt]) begin failures++; $display("coding gain too small at point %0d", pt); end
        checks++;
        if (e2[pt] >= e2[pt - 1] || e4[pt] > e4[pt - 1] + 10) begin failures++; $display("BER not falling at point %0d", pt); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
