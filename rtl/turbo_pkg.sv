// turbo_pkg: shared types, widths and trellis functions of the duo-binary
// (IEEE 802.16e CTC) max-log-MAP turbo decoder.
//
// The component code is the 8-state duo-binary recursive systematic code with
// feedback polynomial 1+D+D^3 and parity polynomials 1+D^2+D^3 (Y) and 1+D^3 (W).
// A trellis step consumes one couple (A,B) and emits one parity pair (Y,W).
// State s = {s1,s2,s3}. The register equations used here are
//   fb = A ^ B ^ s1 ^ s3,  next = {fb, s1 ^ B, s2 ^ B},
//   Y  = fb ^ s2 ^ s3,      W   = fb ^ s3.
// These equations are this design's reading of the encoder drawing; the
// decoder derives its whole trellis from these two functions, so another
// reading changes only them.
//
// Soft values: channel LLRs are signed CH_W-bit numbers, positive meaning a
// '1' is more likely. Symbol LLRs (a priori / extrinsic) are signed EXT_W-bit,
// one per couple value {a,b} = 00,01,10,11, normalised so the largest is 0.
// Gammas (branch metrics) are signed G_W-bit. Path metrics are MW-bit numbers
// that wrap (modulo normalisation); metric_ext_t holds them after quadrant
// based extension to MW+1 bits.
package turbo_pkg;

  localparam int CH_W   = 6;   // channel LLR width
  localparam int EXT_W  = 8;   // symbol (a priori / extrinsic) LLR width
  localparam int G_W    = 10;  // branch metric width
  localparam int MW     = 12;  // path metric width (wraps)
  localparam int NSTATE = 8;
  localparam int NSYM   = 4;   // couple values 00,01,10,11
  localparam int NGAMMA = 16;  // distinct gammas {a,b,y,w}

  typedef logic signed [CH_W-1:0]  ch_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [G_W-1:0]   gamma_t;
  typedef logic [MW-1:0]           metric_t;
  typedef logic signed [MW:0]      metric_ext_t;

  typedef ext_t    [NSYM-1:0]   ext_vec_t;     // index {a,b}
  typedef gamma_t  [NGAMMA-1:0] gamma_vec_t;   // index {a,b,y,w}
  typedef metric_t [NSTATE-1:0] metric_vec_t;  // index state {s1,s2,s3}

  // Soft inputs of one trellis step of one component decoder.
  typedef struct packed {
    ch_t a;
    ch_t b;
    ch_t y;
    ch_t w;
  } step_in_t;

  // One coded couple as stored in the input banks: systematic pair, parity
  // of the first encoder, parity of the second encoder (interleaved order).
  typedef struct packed {
    ch_t a;
    ch_t b;
    ch_t y1;
    ch_t w1;
    ch_t y2;
    ch_t w2;
  } chan_rec_t;

  function automatic logic [2:0] trellis_next(logic [2:0] s, logic [1:0] ab);
    logic fb;
    fb = ab[1] ^ ab[0] ^ s[2] ^ s[0];
    return {fb, s[2] ^ ab[0], s[1] ^ ab[0]};
  endfunction

  // Returns {Y,W} for the branch leaving state s with input couple ab.
  function automatic logic [1:0] trellis_par(logic [2:0] s, logic [1:0] ab);
    logic fb;
    fb = ab[1] ^ ab[0] ^ s[2] ^ s[0];
    return {fb ^ s[1] ^ s[0], fb ^ s[0]};
  endfunction

  // Larger of two wrapping metrics: valid while they differ by less than
  // half the range 2^(MW-1).
  function automatic metric_t mod_max(metric_t x, metric_t y);
    metric_t d;
    d = x - y;
    return d[MW-1] ? y : x;
  endfunction

  // Quadrant extension (see quadrant_detect): sign_ext selects sign
  // extension, otherwise the metric is zero extended.
  function automatic metric_ext_t metric_extend(metric_t m, logic sign_ext);
    return {sign_ext & m[MW-1], m};
  endfunction

  // Exchange the roles of A and B in a symbol LLR vector (01 <-> 10).
  function automatic ext_vec_t swap_ab(ext_vec_t v);
    return {v[3], v[1], v[2], v[0]};
  endfunction

endpackage
