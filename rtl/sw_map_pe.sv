// sw_map_pe: sliding-window max-log-MAP processing element.
//
// Decodes one sub-block of k_len trellis steps of a duo-binary component
// code and produces, per step, four extrinsic symbol LLRs and a hard
// decision. Inside: a branch metric unit, the circular gamma memory (5*L
// steps), one forward (alpha) unit, the circular alpha memory (3*L steps),
// two backward (beta) units and the pipelined LLR unit.
//
// Schedule (one trellis step per cycle, L = WIN_LEN, window w = steps
// wL..wL+L-1, cycle 0 = first cycle after start):
//   cycle t            the BMU fetches step t (rd_en/rd_step) and stores its
//                      gammas and tag
//   cycle 2L+t         the alpha unit processes step t and stores alpha_t
//   cycles (w+2)L ..   beta unit (w mod 2) trains backwards from step
//          (w+3)L-1    (w+2)L-1 down to (w+1)L, starting from all zeros
//   cycles (w+3)L ..   the same unit continues over window w, from step
//          (w+4)L-1    wL+L-1 down to wL, and the LLR unit takes alpha_t,
//                      beta_{t+1} and gamma_t of each step
// The last window has nothing to train on: its beta unit starts from all
// zeros at the sub-block end. LLRs leave 4 cycles after their step enters
// the LLR unit, in reverse step order inside each window, each with the tag
// given with its step. The last LLR leaves k_len + 3L + 4 cycles after the
// start edge and done pulses one cycle later, so back-to-back sub-blocks
// cost k_len + 3L + 5 cycles each. k_len must be a multiple of L, at least L.
// The schedule, the memory depths and the two beta units follow the
// document; the all-zero start vectors at sub-block edges, the tag and the
// handshake are this design's choice.
module sw_map_pe
  import turbo_pkg::*;
#(
  parameter int WIN_LEN = 10,
  parameter int K_MAX   = 600,
  parameter int TAG_W   = 13,
  parameter int KW      = $clog2(K_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [KW-1:0]    k_len,
  // step fetch
  output logic             rd_en,
  output logic [KW-1:0]    rd_step,
  input  step_in_t         in_ch,
  input  ext_vec_t         in_apri,
  input  logic [TAG_W-1:0] in_tag,
  // results
  output logic             out_valid,
  output ext_vec_t         out_ext,
  output logic [1:0]       out_dec,
  output logic [TAG_W-1:0] out_tag,
  output logic             busy,
  output logic             done
);
  localparam int L    = WIN_LEN;
  localparam int GD   = 5 * L;
  localparam int AD   = 3 * L;
  localparam int GAW  = $clog2(GD);
  localparam int AAW  = $clog2(AD);
  localparam int QW   = KW + 1;

  // ---------------- control ----------------
  logic            running, phase2;
  logic [KW-1:0]   k_q, bstep;
  logic [$clog2(2*L)-1:0] pre;
  logic [$clog2(L)-1:0]   kq;
  logic [QW-1:0]   qbase;
  logic [GAW-1:0]  gw, qmod5;
  logic [AAW-1:0]  qmod3;
  logic            qpar;
  logic [2:0]      drain;

  assign rd_en   = running && (bstep < k_q);
  assign rd_step = bstep;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; phase2 <= 1'b0; k_q <= '0; bstep <= '0; pre <= '0;
      kq <= '0; qbase <= '0; gw <= '0; qmod5 <= '0; qmod3 <= '0; qpar <= 1'b0;
      drain <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= 1'b1; phase2 <= 1'b0; k_q <= k_len; bstep <= '0; pre <= '0;
        kq <= '0; qbase <= '0; gw <= '0; qmod5 <= '0; qmod3 <= '0; qpar <= 1'b0;
        drain <= '0;
      end else if (running) begin
        if (rd_en) begin
          bstep <= bstep + 1'b1;
          gw    <= (gw == GAW'(GD - 1)) ? '0 : gw + 1'b1;
        end
        if (!phase2) begin
          pre <= pre + 1'b1;
          if (pre == $bits(pre)'(2 * L - 1)) phase2 <= 1'b1;
        end else if (kq == $bits(kq)'(L - 1)) begin
          kq    <= '0;
          qbase <= qbase + QW'(L);
          qmod5 <= (qmod5 >= GAW'(GD - L)) ? qmod5 - GAW'(GD - L) : qmod5 + GAW'(L);
          qmod3 <= (qmod3 >= AAW'(AD - L)) ? qmod3 - AAW'(AD - L) : qmod3 + AAW'(L);
          qpar  <= ~qpar;
          if (qbase >= QW'(k_q)) begin
            running <= 1'b0;
            drain   <= 3'd4;
          end
        end else begin
          kq <= kq + 1'b1;
        end
      end else if (drain != 0) begin
        drain <= drain - 1'b1;
        if (drain == 3'd1) done <= 1'b1;
      end
    end
  end

  assign busy = running || (drain != 0);

  // addresses of this cycle
  logic            alpha_en, alpha_first, train_v, prod_v, train_first, prod_first;
  logic [GAW-1:0]  a_gaddr, t_gaddr, p_gaddr;
  logic [AAW-1:0]  a_waddr, p_aaddr;

  function automatic logic [GAW-1:0] wrap5(int v);
    return GAW'((v >= GD) ? v - GD : v);
  endfunction
  function automatic logic [AAW-1:0] wrap3(int v);
    return AAW'((v >= AD) ? v - AD : v);
  endfunction

  always_comb begin
    alpha_en    = running && phase2 && ((qbase + QW'(kq)) < QW'(k_q));
    alpha_first = (qbase == '0) && (kq == '0);
    train_v     = running && phase2 && ((qbase + QW'(2 * L)) <= QW'(k_q));
    prod_v      = running && phase2 && (qbase >= QW'(L)) && (qbase < QW'(k_q) + QW'(L));
    train_first = (kq == '0);
    prod_first  = (kq == '0) && (qbase >= QW'(k_q));
    a_gaddr     = wrap5(int'(qmod5) + int'(kq));
    t_gaddr     = wrap5(int'(qmod5) + 2 * L - 1 - int'(kq));
    p_gaddr     = wrap5(int'(qmod5) + GD - 1 - int'(kq));
    a_waddr     = wrap3(int'(qmod3) + int'(kq));
    p_aaddr     = wrap3(int'(qmod3) + AD - 1 - int'(kq));
  end

  // ---------------- datapath ----------------
  gamma_vec_t       bmu_gamma;
  logic [GAW-1:0]   graddr [3];
  gamma_vec_t       rgamma [3];
  logic [TAG_W-1:0] rtag [3];

  bmu u_bmu (.ch(in_ch), .apri(in_apri), .gamma(bmu_gamma));

  // read port 0: alpha unit; port 1: beta unit 0; port 2: beta unit 1
  assign graddr[0] = a_gaddr;
  assign graddr[1] = qpar ? p_gaddr : t_gaddr;
  assign graddr[2] = qpar ? t_gaddr : p_gaddr;

  gamma_mem #(.WIN_LEN(L), .TAG_W(TAG_W)) u_gmem (
    .clk, .we(rd_en), .waddr(gw), .wgamma(bmu_gamma), .wtag(in_tag),
    .raddr(graddr), .rgamma, .rtag
  );

  metric_vec_t alpha_cur;
  alpha_unit u_alpha (
    .clk, .rst_n, .en(alpha_en), .first(alpha_first), .gamma(rgamma[0]),
    .alpha_cur
  );

  metric_ext_t alpha_rd [NSTATE];
  alpha_mem #(.WIN_LEN(L)) u_amem (
    .clk, .we(alpha_en), .waddr(a_waddr), .wdata(alpha_cur),
    .raddr(p_aaddr), .rdata(alpha_rd)
  );

  // beta unit u trains when qpar == u and produces when qpar != u
  metric_vec_t beta_cur [2];
  logic        b_en [2], b_first [2];
  always_comb begin
    for (int u = 0; u < 2; u++) begin
      if (qpar == u[0]) begin
        b_en[u]    = train_v;
        b_first[u] = train_first;
      end else begin
        b_en[u]    = prod_v;
        b_first[u] = prod_first;
      end
    end
  end

  beta_unit u_beta0 (
    .clk, .rst_n, .en(b_en[0]), .first(b_first[0]), .gamma(rgamma[1]),
    .beta_cur(beta_cur[0])
  );
  beta_unit u_beta1 (
    .clk, .rst_n, .en(b_en[1]), .first(b_first[1]), .gamma(rgamma[2]),
    .beta_cur(beta_cur[1])
  );

  llr_unit #(.TAG_W(TAG_W)) u_llr (
    .clk, .rst_n, .in_valid(prod_v),
    .alpha(alpha_rd),
    .beta(qpar ? beta_cur[0] : beta_cur[1]),
    .gamma(qpar ? rgamma[1] : rgamma[2]),
    .in_tag(qpar ? rtag[1] : rtag[2]),
    .out_valid, .out_ext, .out_dec, .out_tag
  );
endmodule
