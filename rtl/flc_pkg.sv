// flc_pkg: shared sizes and types of the fuzzy logic controller (FLC).
//
// The controller has four crisp 8-bit inputs, four trapezoidal (or
// triangular) membership functions per input, an overlap of two (so an input
// touches at most two neighbouring membership functions) and five output
// membership functions. With an overlap of two and four inputs, 2^4 = 16 rules
// fire for every inference. The rule base holds 4^4 = 256 rules, addressed by
// the concatenated 2-bit member indices of the four inputs.
//
// Numbers are 8-bit unsigned integers and a degree of membership is an
// integer from 0 to 255, as the FLC design prescribes. The slope of a
// membership-function edge is this design's own choice of encoding: an
// unsigned Q4.4 fixed-point number (4 integer bits, 4 fraction bits).
package flc_pkg;

  parameter int unsigned DATA_W    = 8;   // crisp values and degrees
  parameter int unsigned N_IN      = 4;   // crisp inputs
  parameter int unsigned N_MF      = 4;   // membership functions per input
  parameter int unsigned MF_IDX_W  = 2;   // bits of a member index
  parameter int unsigned N_OMF     = 5;   // output membership functions
  parameter int unsigned OMF_IDX_W = 3;   // bits of an output member index
  parameter int unsigned OVERLAP   = 2;   // degree of overlap
  parameter int unsigned N_ACTIVE  = OVERLAP ** N_IN;     // 16 active rules
  parameter int unsigned RULE_AW   = N_IN * MF_IDX_W;     // 8 address bits
  parameter int unsigned N_RULES   = 1 << RULE_AW;        // 256 rules
  parameter int unsigned SLOPE_FRAC = 4;  // fraction bits of a slope

  // COG sums: 16 products of two 8-bit values, 16 degrees
  parameter int unsigned NUM_W = 2 * DATA_W + $clog2(N_ACTIVE);  // 20
  parameter int unsigned DEN_W = DATA_W + $clog2(N_ACTIVE);      // 12
  parameter int unsigned DIV_W = 16;  // divider width = its latency

  typedef logic [DATA_W-1:0]   data_t;
  typedef logic [MF_IDX_W-1:0] mf_idx_t;
  typedef logic [RULE_AW-1:0]  rule_addr_t;

  // Key points of one membership function (Fig. "Trapezoidal membership
  // function"): base from left to right, flat top from tleft to tright.
  // A triangle has tleft == tright.
  typedef struct packed {
    data_t left;
    data_t tleft;
    data_t tright;
    data_t right;
    data_t height;
    data_t slope_l;   // rising edge, Q4.4
    data_t slope_r;   // falling edge, Q4.4
  } mf_param_t;

  parameter int unsigned MF_FIELDS = 7;

  // The four implementations of the controller
  typedef enum logic [1:0] {
    FLC1_COMB_COG = 2'd0,  // combinational rules, centre of gravity
    FLC2_COMB_FOM = 2'd1,  // combinational rules, first of maxima
    FLC3_BRAM_COG = 2'd2,  // block-RAM rules, centre of gravity
    FLC4_BRAM_FOM = 2'd3   // block-RAM rules, first of maxima
  } flc_mode_e;

  // Configuration write map (byte addresses of the cfg port)
  parameter logic [11:0] CFG_BRAM_BASE = 12'h000;  // 256 x output centre
  parameter logic [11:0] CFG_COMB_BASE = 12'h100;  // 256 x output member index
  parameter logic [11:0] CFG_MF_BASE   = 12'h200;  // in*28 + mf*7 + field
  parameter logic [11:0] CFG_OMF_BASE  = 12'h280;  // 5 x output centre
  parameter logic [11:0] CFG_MODE_ADDR = 12'h300;  // flc_mode_e

endpackage
