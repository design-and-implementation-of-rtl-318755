// turbo_decoder_check: test harness that builds the decoder with a given
// number of PEs and bank depth, decodes one random block of N couples and
// compares every decision and extrinsic LLR with the reference turbo
// decoder (ref_turbo, split into NPE sub-blocks), and the decode time with
// 2 * ITERS * (N/NPE + 3L + 6) cycles. Results are counted on its outputs;
// finished rises at the end. Used by turbo_decoder_npe_tb.
module turbo_decoder_check
  import turbo_pkg::*;
  import turbo_ref_pkg::*;
#(
  parameter int NPE   = 2,
  parameter int K_MAX = 600,
  parameter int N     = 1200,
  parameter int P0    = 53,
  parameter int P1    = 62,
  parameter int P2    = 12,
  parameter int P3    = 2,
  parameter int ITERS = 2,
  parameter int AMP   = 12,
  parameter int NOISE = 18
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   bit_errors,
  output logic finished
);
  localparam int L  = 10;
  localparam int NW = $clog2(NPE * K_MAX + 1);

  logic start, in_valid, in_ready, out_valid, busy, done;
  logic [NW-1:0] n_len, p0, p1, p2, p3;
  logic [3:0] n_iter;
  chan_rec_t in_rec;
  logic [1:0] out_dec;
  ext_vec_t out_llr;
  logic qpp_start, qpp_en;
  logic [12:0] qpp_n, qpp_f1, qpp_f2, qpp_addr, qpp_index;

  turbo_decoder_top #(.NPE(NPE), .K_MAX(K_MAX), .WIN_LEN(L)) dut (.*);

  initial begin
    int u [];
    int rec [][6];
    int ld [][4];
    int dec [];
    int cyc, t_dec, k;
    checks = 0; failures = 0; bit_errors = 0; finished = 0;
    {start, in_valid, qpp_start, qpp_en} = '0;
    {n_len, p0, p1, p2, p3} = '0;
    n_iter = 0; in_rec = '0; qpp_n = 0; qpp_f1 = 0; qpp_f2 = 0;
    k = N / NPE;
    ref_make_block(N, P0, P1, P2, P3, AMP, NOISE, u, rec);
    ref_turbo(rec, N, NPE, L, P0, P1, P2, P3, ITERS, ld, dec);
    wait (rst_n);
    @(negedge clk);
    n_len = NW'(N); p0 = NW'(P0); p1 = NW'(P1); p2 = NW'(P2); p3 = NW'(P3);
    n_iter = 4'(ITERS);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < N; i++) begin
      in_rec = '{a: ch_t'(rec[i][0]), b: ch_t'(rec[i][1]), y1: ch_t'(rec[i][2]),
                 w1: ch_t'(rec[i][3]), y2: ch_t'(rec[i][4]), w2: ch_t'(rec[i][5])};
      in_valid = 1;
      checks++;
      if (!in_ready) failures++;
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    t_dec = -1;
    while (!out_valid && cyc < 100000) begin
      if (dut.pe_start && t_dec < 0) t_dec = cyc;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc - t_dec != 2 * ITERS * (k + 3 * L + 6)) begin
      failures++; $display("NPE=%0d: decode took %0d cycles", NPE, cyc - t_dec);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (!out_valid || int'(out_dec) != dec[i]) failures++;
      for (int a = 0; a < 4; a++) if (int'(out_llr[a]) != ld[i][a]) failures++;
      if (int'(out_dec) != u[i]) bit_errors++;
      @(negedge clk);
    end
    $display("NPE=%0d N=%0d iterations=%0d: %0d couple errors, decode %0d cycles, %0d failures",
             NPE, N, ITERS, bit_errors, cyc - t_dec, failures);
    finished = 1;
  end
endmodule
