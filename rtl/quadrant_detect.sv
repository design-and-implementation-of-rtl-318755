// quadrant_detect: free-quadrant detection for modulo metric normalisation.
//
// Path metrics wrap around in MW bits. The two MSBs of a metric name the
// quadrant (00, 01, 10, 11) of the circle it lies in. While the eight metrics
// of one step spread over less than three quadrants, at least one quadrant
// holds none of them, and the metrics can be turned into ordinary numbers
// by one extension rule:
//   free quadrant 00 or 11 -> zero extension (metrics read as unsigned),
//   free quadrant 01 or 10 -> sign extension (metrics read as signed).
// The rule follows the quadrant drawing; this block prefers sign extension
// whenever quadrant 01 or 10 is free. Output sign_ext is that extension bit,
// stored with each metric vector and applied with turbo_pkg::metric_extend.
// Combinational.
module quadrant_detect
  import turbo_pkg::*;
(
  input  metric_vec_t m,
  output logic        sign_ext
);
  // Only quadrants 01 and 10 decide: if either is free, sign extension is
  // correct; if both are occupied, 00 or 11 is free and zero extension is.
  logic occ01, occ10;
  always_comb begin
    occ01 = 1'b0;
    occ10 = 1'b0;
    for (int s = 0; s < NSTATE; s++) begin
      occ01 |= (m[s][MW-1 -: 2] == 2'b01);
      occ10 |= (m[s][MW-1 -: 2] == 2'b10);
    end
    sign_ext = ~occ01 | ~occ10;
  end
endmodule
