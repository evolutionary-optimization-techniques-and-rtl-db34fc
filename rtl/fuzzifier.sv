// fuzzifier: maps one crisp input onto its two overlapping membership functions.
//
// With an overlap of two, an input lies on at most two neighbouring membership
// functions k and k+1. A row of comparators against the left base points
// selects k: it is the largest i (0 .. N_MF-2) with x >= left of function i+1,
// or 0. The parameters of functions k and k+1 are then multiplexed into two
// mf_eval units (one multiplier and subtractor per overlapping function, as
// the resource relations of the FLC design state). The membership functions
// must be ordered by their left points; that ordering is this design's
// assumption about how the sets are laid out.
//
// Outputs: the two member indices (lower first) and their degrees.
// Purely combinational.
module fuzzifier
  import flc_pkg::*;
(
  input  data_t     x,
  input  mf_param_t mf  [N_MF],
  output mf_idx_t   idx [OVERLAP],
  output data_t     deg [OVERLAP]
);

  mf_idx_t   k;
  mf_param_t p_lo, p_hi;

  always_comb begin
    k = '0;
    for (int unsigned i = 1; i <= N_MF - 2; i++)
      if (x >= mf[i+1].left) k = mf_idx_t'(i);
  end

  assign idx[0] = k;
  assign idx[1] = k + mf_idx_t'(1);
  assign p_lo   = mf[k];
  assign p_hi   = mf[idx[1]];

  mf_eval u_lo (.x(x), .p(p_lo), .degree(deg[0]));
  mf_eval u_hi (.x(x), .p(p_hi), .degree(deg[1]));

endmodule
