// bank_mem: NPE-bank memory with a crossbar on its read and write ports.
//
// Used for the coded-input banks, the two LLR memories (natural and
// interleaved order) and the decision memory of the decoder. Bank b holds
// the DEPTH entries of sub-block b. Each of NWR write ports and NRD read
// ports names a bank and an address; every port can reach every bank, which
// is how the interleaver's rotated bank addresses reach the processing
// elements. The interleaver guarantees that in one cycle no two enabled
// write ports hit the same bank; an assertion checks it (the behaviour of a
// real single-ported bank under a conflict is not modelled: the
// highest-numbered port wins). Writes are synchronous, reads asynchronous.
// The banking follows the decoder's top-level drawing; port counts and
// timing are this design's choice.
module bank_mem #(
  parameter int NPE   = 4,
  parameter int DEPTH = 600,
  parameter int WIDTH = 32,
  parameter int NRD   = 4,
  parameter int NWR   = 4,
  parameter int BW    = $clog2(NPE),
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en   [NWR],
  input  logic [BW-1:0]    wr_bank [NWR],
  input  logic [AW-1:0]    wr_addr [NWR],
  input  logic [WIDTH-1:0] wr_data [NWR],
  input  logic [BW-1:0]    rd_bank [NRD],
  input  logic [AW-1:0]    rd_addr [NRD],
  output logic [WIDTH-1:0] rd_data [NRD]
);
  logic [WIDTH-1:0] mem [NPE][DEPTH];

  always_ff @(posedge clk) begin
    for (int w = 0; w < NWR; w++)
      if (wr_en[w]) mem[wr_bank[w]][wr_addr[w]] <= wr_data[w];
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_data[r] = mem[rd_bank[r]][rd_addr[r]];
  end

  // no two enabled write ports may address the same bank in one cycle
  always_ff @(posedge clk) begin
    for (int a = 0; a < NWR; a++)
      for (int b = a + 1; b < NWR; b++)
        assert (!(wr_en[a] && wr_en[b] && wr_bank[a] == wr_bank[b]))
          else $error("bank_mem: write ports %0d and %0d both address bank %0d", a, b, wr_bank[a]);
  end
endmodule
