// llr_unit: four-stage pipelined symbol LLR calculation.
//
// For one trellis step t it combines the forward metrics alpha_t (already
// extended, from the alpha memory), the backward metrics beta_{t+1} (wrapping,
// from a beta unit) and the 16 gammas of the step:
//   stage 1  extend beta by its free quadrant; register alpha, beta, gamma
//   stage 2  32 branch sums alpha(s) + gamma(branch) + beta(next(s,ab))
//   stage 3  per couple value ab the maximum over its 8 branches (Lambda_ab)
//   stage 4  extrinsic e_ab = Lambda_ab - gamma[{ab,0,0}] (removes a priori
//            and systematic part), subtract the largest e_ab from all four,
//            saturate to EXT_W bits; hard decision = argmax Lambda_ab
//            (lowest ab on a tie)
// Outputs appear 4 cycles after the inputs; one step per cycle. The tag is
// carried along unchanged. The stage split follows the document's four-stage
// pipeline and its max-subtraction scaling; the exact stage contents and the
// saturation are this design's choice.
module llr_unit
  import turbo_pkg::*;
#(
  parameter int TAG_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  metric_ext_t      alpha [NSTATE],
  input  metric_vec_t      beta,
  input  gamma_vec_t       gamma,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output ext_vec_t         out_ext,
  output logic [1:0]       out_dec,
  output logic [TAG_W-1:0] out_tag
);
  localparam int SW = MW + 4;   // width of the branch sums
  typedef logic signed [SW-1:0] sum_t;

  logic             v1, v2, v3;
  logic [TAG_W-1:0] t1, t2, t3;

  // stage 1
  logic        beta_sign;
  metric_ext_t a1 [NSTATE];
  metric_ext_t b1 [NSTATE];
  gamma_vec_t  g1, g2, g3;
  quadrant_detect u_qd (.m(beta), .sign_ext(beta_sign));

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTATE; s++) begin
      a1[s] <= alpha[s];
      b1[s] <= metric_extend(beta[s], beta_sign);
    end
    g1 <= gamma;
    t1 <= in_tag;
  end

  // stage 2
  sum_t bm [NSYM][NSTATE];
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTATE; s++)
      for (int ab = 0; ab < NSYM; ab++)
        bm[ab][s] <= sum_t'(a1[s]) + sum_t'(b1[trellis_next(3'(s), 2'(ab))])
                   + sum_t'(g1[{2'(ab), trellis_par(3'(s), 2'(ab))}]);
    g2 <= g1;
    t2 <= t1;
  end

  // stage 3
  sum_t lam [NSYM];
  always_ff @(posedge clk) begin
    for (int ab = 0; ab < NSYM; ab++) begin
      sum_t m;
      m = bm[ab][0];
      for (int s = 1; s < NSTATE; s++) if (bm[ab][s] > m) m = bm[ab][s];
      lam[ab] <= m;
    end
    g3 <= g2;
    t3 <= t2;
  end

  // stage 4
  always_ff @(posedge clk) begin
    sum_t e [NSYM];
    sum_t emax, lmax, d;
    logic [1:0] dec;
    for (int ab = 0; ab < NSYM; ab++) e[ab] = lam[ab] - sum_t'(g3[{2'(ab), 2'b00}]);
    emax = e[0];
    lmax = lam[0];
    dec  = 2'd0;
    for (int ab = 1; ab < NSYM; ab++) begin
      if (e[ab] > emax) emax = e[ab];
      if (lam[ab] > lmax) begin
        lmax = lam[ab];
        dec  = 2'(ab);
      end
    end
    for (int ab = 0; ab < NSYM; ab++) begin
      d = e[ab] - emax;
      out_ext[ab] <= (d < sum_t'(-(2 ** (EXT_W - 1)))) ? ext_t'(-(2 ** (EXT_W - 1))) : ext_t'(d);
    end
    out_dec <= dec;
    out_tag <= t3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {v1, v2, v3, out_valid} <= '0;
    else        {v1, v2, v3, out_valid} <= {in_valid, v1, v2, v3};
  end
endmodule
