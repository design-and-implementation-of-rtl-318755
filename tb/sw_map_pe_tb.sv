// sw_map_pe_tb: runs the processing element over sub-blocks of encoded,
// noisy couples with random a priori LLRs and compares every extrinsic LLR
// vector and hard decision with the windowed max-log-MAP reference model,
// plus the number of outputs and the sub-block latency (done k + 3L + 5
// clock edges after the start edge).
module sw_map_pe_tb;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int L = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [9:0] k_len;
  logic rd_en;
  logic [9:0] rd_step;
  step_in_t in_ch;
  ext_vec_t in_apri;
  logic [12:0] in_tag;
  logic out_valid, busy, done;
  ext_vec_t out_ext;
  logic [1:0] out_dec;
  logic [12:0] out_tag;

  sw_map_pe dut (.*);

  int checks = 0, failures = 0;
  int ch [][4];
  int la [][4];
  int ext_r [][4];
  int dec_r [];
  int seen [];

  function automatic int clampch(int v);
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  always_comb begin
    int t;
    t = int'(rd_step);
    in_ch = '0; in_apri = '0; in_tag = 13'(rd_step);
    if (t < ch.size()) begin
      in_ch.a = ch_t'(ch[t][0]); in_ch.b = ch_t'(ch[t][1]);
      in_ch.y = ch_t'(ch[t][2]); in_ch.w = ch_t'(ch[t][3]);
      for (int i = 0; i < 4; i++) in_apri[i] = ext_t'(la[t][i]);
    end
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int t;
    t = int'(out_tag);
    checks++;
    if (t >= dec_r.size()) begin failures++; $display("bad tag %0d", t); end
    else begin
      seen[t]++;
      if (out_dec != 2'(dec_r[t])) begin
        failures++; $display("step %0d dec %0d exp %0d", t, out_dec, dec_r[t]);
      end
      for (int i = 0; i < 4; i++) if (int'(out_ext[i]) != ext_r[t][i]) begin
        failures++; $display("step %0d ext[%0d] %0d exp %0d", t, i, out_ext[i], ext_r[t][i]);
      end
    end
  end

  task automatic run_block(int k, int amp, int noise, int apri_mag);
    int ab [];
    int yw [];
    int cyc;
    ab = new[k];
    ch = new[k];
    la = new[k];
    seen = new[k];
    foreach (ab[i]) ab[i] = $urandom_range(0, 3);
    ref_encode(ab, yw);
    for (int t = 0; t < k; t++) begin
      int bits [4];
      int zero;
      bits = '{(ab[t] >> 1) & 1, ab[t] & 1, (yw[t] >> 1) & 1, yw[t] & 1};
      for (int i = 0; i < 4; i++)
        ch[t][i] = clampch((bits[i] ? amp : -amp) + $urandom_range(0, 2 * noise) - noise);
      zero = $urandom_range(0, 3);
      for (int i = 0; i < 4; i++) la[t][i] = (i == zero) ? 0 : -int'($urandom_range(0, apri_mag));
    end
    ref_map(ch, la, k, L, ext_r, dec_r);
    @(negedge clk);
    k_len = 10'(k);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != k + 3 * L + 5) begin
      failures++; $display("latency %0d exp %0d", cyc, k + 3 * L + 5);
    end
    for (int t = 0; t < k; t++) begin
      checks++;
      if (seen[t] != 1) begin failures++; $display("step %0d seen %0d times", t, seen[t]); end
    end
  endtask

  initial begin
    start = 0; k_len = 0;
    ch = new[0];
    dec_r = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(60, 12, 20, 40);    // noisy
    run_block(10, 20, 6, 5);      // single window
    run_block(200, 31, 0, 0);     // clean, large metrics
    run_block(120, 8, 30, 128);   // very noisy, saturating a priori
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
