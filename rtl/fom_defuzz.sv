// fom_defuzz: first-of-maxima defuzzifier.
//
// Searches the active rules in order 0 .. N_ACTIVE-1 for the largest firing
// degree and outputs the centre `y` of the first rule that reaches it (a later
// rule replaces the current choice only when its degree is strictly larger).
// One comparator per active rule, as the FLC design states. When every degree
// is zero the result is the centre of rule 0, which follows from the
// definition; that reading is this design's.
//
// Purely combinational.
module fom_defuzz
  import flc_pkg::*;
(
  input  data_t y [N_ACTIVE],
  input  data_t w [N_ACTIVE],
  output data_t out
);

  always_comb begin
    data_t best;
    best = w[0];
    out  = y[0];
    for (int unsigned r = 1; r < N_ACTIVE; r++) begin
      if (w[r] > best) begin
        best = w[r];
        out  = y[r];
      end
    end
  end

endmodule
