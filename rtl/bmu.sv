// bmu: branch metric unit (gamma calculation unit) of one processing element.
//
// For one trellis step it forms the 16 distinct log-domain branch metrics of
// the duo-binary code, one per combination of input couple {a,b} and parity
// pair {y,w}:
//   gamma[{a,b,y,w}] = La[{a,b}] + a*LA + b*LB + y*LY + w*LW
// i.e. the log-MAP branch metric with the noise-variance term dropped, using
// the a priori symbol LLR and the channel bit LLRs (positive = '1'). The sum is
// exact in G_W bits for the widths of turbo_pkg (|La| <= 128, |L*| <= 32).
// Purely combinational; its result is written into the gamma memory in the
// same cycle. Which terms form the metric follows the MAP equations; the
// widths are this design's choice.
module bmu
  import turbo_pkg::*;
(
  input  step_in_t   ch,     // channel LLRs LA, LB, LY, LW of this step
  input  ext_vec_t   apri,   // a priori symbol LLRs, index {a,b}
  output gamma_vec_t gamma   // index {a,b,y,w}
);
  always_comb begin
    for (int i = 0; i < NGAMMA; i++) begin
      logic [3:0] idx;
      gamma_t g;
      idx = 4'(i);
      g = gamma_t'(apri[idx[3:2]]);
      if (idx[3]) g = g + gamma_t'(ch.a);
      if (idx[2]) g = g + gamma_t'(ch.b);
      if (idx[1]) g = g + gamma_t'(ch.y);
      if (idx[0]) g = g + gamma_t'(ch.w);
      gamma[i] = g;
    end
  end
endmodule
