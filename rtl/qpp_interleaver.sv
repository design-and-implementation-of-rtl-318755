// qpp_interleaver: serial LTE QPP interleaver address generator.
//
// Produces P(i) = (f1*i + f2*i^2) mod N for i = 0, 1, 2, ... one address per
// enabled cycle, without multiplier or divider, from the recursion
//   P(i+1) = P(i) + g(i)  mod N,   g(i) = (f1 + f2 + 2*f2*i) mod N,
//   g(i+1) = g(i) + 2*f2  mod N,
// so each step is two modular additions (add, then subtract N if the sum
// reached N). start loads P = 0, g = (f1+f2) mod N and the increment
// (2*f2) mod N from the inputs; addr shows P(i) of the current index i, and
// each en cycle moves to i+1. Needs f1, f2 < N. The recursion follows the
// document; the register layout is this design's choice.
module qpp_interleaver #(
  parameter int N_MAX = 6144,
  parameter int NW    = $clog2(N_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          en,
  input  logic [NW-1:0] n_len,
  input  logic [NW-1:0] f1,
  input  logic [NW-1:0] f2,
  output logic [NW-1:0] addr,
  output logic [NW-1:0] index
);
  logic [NW-1:0] n_q, g_q, inc_q;

  function automatic logic [NW-1:0] add_mod(logic [NW-1:0] a, logic [NW-1:0] b, logic [NW-1:0] n);
    logic [NW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, n}) s = s - {1'b0, n};
    return NW'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; g_q <= '0; inc_q <= '0; addr <= '0; index <= '0;
    end else if (start) begin
      n_q   <= n_len;
      g_q   <= add_mod(f1, f2, n_len);
      inc_q <= add_mod(f2, f2, n_len);
      addr  <= '0;
      index <= '0;
    end else if (en) begin
      addr  <= add_mod(addr, g_q, n_q);
      g_q   <= add_mod(g_q, inc_q, n_q);
      index <= index + 1'b1;
    end
  end
endmodule
