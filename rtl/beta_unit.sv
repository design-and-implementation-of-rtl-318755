// beta_unit: backward recursion (add-compare-select) unit.
//
// Each enabled cycle it moves the backward path metrics one trellis step
// towards the start of the block:
//   beta_t(s) = max over the 4 inputs ab of
//               beta_{t+1}(next(s,ab)) + gamma_t[{ab, Y(s,ab), W(s,ab)}]
// Metrics wrap in MW bits and are compared wrap-safely (turbo_pkg::mod_max).
// beta_cur is beta_{t+1}, the metric at the end of the step given on gamma;
// it is what the LLR unit needs for that step. With first=1 the unit starts
// from the all-zero vector (used at the start of a training run and at the
// end of a sub-block). Registered: beta_t appears on beta_cur the cycle
// after an enabled step. Two of these units alternate in each processing
// element, one training while the other delivers metrics.
module beta_unit
  import turbo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        first,
  input  gamma_vec_t  gamma,
  output metric_vec_t beta_cur
);
  metric_vec_t beta_q, beta_d;

  assign beta_cur = first ? '0 : beta_q;

  always_comb begin
    for (int s = 0; s < NSTATE; s++) begin
      metric_t cand [4];
      for (int ab = 0; ab < NSYM; ab++)
        cand[ab] = beta_cur[trellis_next(3'(s), 2'(ab))]
                 + metric_t'(gamma[{2'(ab), trellis_par(3'(s), 2'(ab))}]);
      beta_d[s] = mod_max(mod_max(cand[0], cand[1]), mod_max(cand[2], cand[3]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  beta_q <= '0;
    else if (en) beta_q <= beta_d;
  end
endmodule
