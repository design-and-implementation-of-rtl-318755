// alpha_mem: circular forward metric memory of one processing element.
//
// Stores the eight forward metrics of each of the last DEPTH = 3*L steps,
// from the alpha unit, until the LLR unit reads them back in reverse order
// within each window. On write it computes the modulo-normalisation
// extension bit of the vector (quadrant_detect) and stores it with the
// metrics; on read it returns the metrics already extended to MW+1 bits, so
// they compare correctly whatever wrap-around occurred. One synchronous
// write port, one asynchronous read port. Depth and the stored extension bit
// follow the document; port timing is this design's choice.
module alpha_mem
  import turbo_pkg::*;
#(
  parameter int WIN_LEN = 10,
  parameter int DEPTH   = 3 * WIN_LEN,
  parameter int AW      = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  metric_vec_t   wdata,
  input  logic [AW-1:0] raddr,
  output metric_ext_t   rdata [NSTATE]
);
  metric_vec_t m_mem [DEPTH];
  logic        e_mem [DEPTH];
  logic        w_ext;

  quadrant_detect u_qd (.m(wdata), .sign_ext(w_ext));

  always_ff @(posedge clk) begin
    if (we) begin
      m_mem[waddr] <= wdata;
      e_mem[waddr] <= w_ext;
    end
  end

  always_comb begin
    for (int s = 0; s < NSTATE; s++)
      rdata[s] = metric_extend(m_mem[raddr][s], e_mem[raddr]);
  end
endmodule
