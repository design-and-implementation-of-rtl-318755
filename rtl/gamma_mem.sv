// gamma_mem: circular branch metric memory of one processing element.
//
// Holds the 16 gammas of each of the last DEPTH = 5*L trellis steps, with a
// TAG_W-bit tag travelling with each step (the write-back address of its
// LLR). The branch metric unit writes one step per cycle; the alpha unit and
// the two beta units read three different steps in the same cycle. Addresses
// are step mod DEPTH, generated by the PE's scheduler, so the memory is used
// circularly. One synchronous write port, three asynchronous read ports; a
// read of the address being written returns the old word. The 5*L depth
// follows the sliding-window schedule; the port count and the tag field are
// this design's choice.
module gamma_mem
  import turbo_pkg::*;
#(
  parameter int WIN_LEN = 10,
  parameter int TAG_W   = 13,
  parameter int DEPTH   = 5 * WIN_LEN,
  parameter int AW      = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  gamma_vec_t       wgamma,
  input  logic [TAG_W-1:0] wtag,
  input  logic [AW-1:0]    raddr [3],
  output gamma_vec_t       rgamma [3],
  output logic [TAG_W-1:0] rtag [3]
);
  gamma_vec_t       g_mem [DEPTH];
  logic [TAG_W-1:0] t_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      g_mem[waddr] <= wgamma;
      t_mem[waddr] <= wtag;
    end
  end

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rgamma[p] = g_mem[raddr[p]];
      rtag[p]   = t_mem[raddr[p]];
    end
  end
endmodule
