// alpha_unit: forward recursion (add-compare-select) unit.
//
// Each enabled cycle it advances the forward path metrics by one trellis step:
//   alpha_{t+1}(s') = max over the 4 branches (s,ab) into s' of
//                     alpha_t(s) + gamma_t[{ab, Y(s,ab), W(s,ab)}]
// Metrics wrap in MW bits (modulo normalisation); the compare uses the
// wrap-safe difference of turbo_pkg::mod_max, so no normalising subtraction
// sits in the loop. alpha_cur is alpha_t, the metric entering the step given
// on gamma; with first=1 the unit starts from the all-zero (equiprobable)
// vector instead of its register. Registered: alpha_{t+1} appears on
// alpha_cur the cycle after an enabled step. The recursion is the max-log-MAP
// one; the start vector and the single-cycle timing are this design's choice.
module alpha_unit
  import turbo_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        first,
  input  gamma_vec_t  gamma,
  output metric_vec_t alpha_cur
);
  metric_vec_t alpha_q, alpha_d;

  assign alpha_cur = first ? '0 : alpha_q;

  always_comb begin
    for (int sp = 0; sp < NSTATE; sp++) begin
      metric_t cand [4];
      int n;
      n = 0;
      for (int i = 0; i < 4; i++) cand[i] = '0;
      for (int s = 0; s < NSTATE; s++) begin
        for (int ab = 0; ab < NSYM; ab++) begin
          if (trellis_next(3'(s), 2'(ab)) == 3'(sp)) begin
            cand[n[1:0]] = alpha_cur[s]
                         + metric_t'(gamma[{2'(ab), trellis_par(3'(s), 2'(ab))}]);
            n++;
          end
        end
      end
      alpha_d[sp] = mod_max(mod_max(cand[0], cand[1]), mod_max(cand[2], cand[3]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  alpha_q <= '0;
    else if (en) alpha_q <= alpha_d;
  end
endmodule
