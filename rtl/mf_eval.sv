// mf_eval: degree of membership of one crisp input in one membership function.
//
// Evaluates the trapezoid equation of the FLC fuzzifier: zero outside the
// base, a rising edge from `left` to `tleft`, the full `height` on the flat
// top from `tleft` to `tright`, and a falling edge from `tright` to `right`.
// A triangle is the case tleft == tright. Instead of dividing the height by
// the edge width, each edge is described by a stored slope, so the unit needs
// only comparators, one subtractor and one multiplier per edge, as the design
// calls for. The slope is an unsigned Q4.4 number (this design's choice); the
// product is truncated to an integer and clipped at `height`.
//
// Purely combinational: the degree follows `x` and `p` in the same cycle.
module mf_eval
  import flc_pkg::*;
(
  input  data_t     x,       // crisp input
  input  mf_param_t p,       // key points of the membership function
  output data_t     degree   // 0 .. height
);

  localparam int unsigned PROD_W = 2 * DATA_W;

  logic [PROD_W-1:0] rise, fall;
  logic [PROD_W-1:0] rise_int, fall_int;

  always_comb begin
    rise     = PROD_W'(p.slope_l) * PROD_W'(x - p.left);
    fall     = PROD_W'(p.slope_r) * PROD_W'(p.right - x);
    rise_int = rise >> SLOPE_FRAC;
    fall_int = fall >> SLOPE_FRAC;

    if (x < p.left || x > p.right)
      degree = '0;
    else if (x < p.tleft)
      degree = (rise_int > PROD_W'(p.height)) ? p.height : rise_int[DATA_W-1:0];
    else if (x <= p.tright)
      degree = p.height;
    else
      degree = (fall_int > PROD_W'(p.height)) ? p.height : fall_int[DATA_W-1:0];
  end

endmodule
