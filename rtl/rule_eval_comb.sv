// rule_eval_comb: combinational rule base (logic/LUT implementation).
//
// A rule table gives, for each of the N_RULES combinations of input members,
// the index of the output membership function the rule concludes. All
// N_ACTIVE active rules are looked up in parallel and each index drives a
// multiplexer that picks the centre of that output membership function, so
// the rule outputs Y1..Y16 follow the rule addresses in the same cycle.
//
// The table and the output centres are registers written through a simple
// write port (this design's stand-in for the FPGA configuration). Entries of
// the table that name no output function (values N_OMF .. 7) nullify the rule:
// its `en` output is 0 and the caller gives it zero weight, which is how a
// rule is switched off by a weight change.
//
// Write timing: `we` with `waddr`/`wdata` takes effect on the next rising
// edge. Reads are combinational. The tables have no reset: they must be
// loaded before use, as a configuration would be.
module rule_eval_comb
  import flc_pkg::*;
(
  input  logic       clk,
  // rule table write (index of output membership function)
  input  logic                 tab_we,
  input  rule_addr_t           tab_waddr,
  input  logic [OMF_IDX_W-1:0] tab_wdata,
  // output membership-function centre write
  input  logic                 omf_we,
  input  logic [OMF_IDX_W-1:0] omf_waddr,
  input  data_t                omf_wdata,
  // active rules
  input  rule_addr_t addr [N_ACTIVE],
  output data_t      y    [N_ACTIVE],
  output logic       en   [N_ACTIVE]
);

  logic [OMF_IDX_W-1:0] table_q [N_RULES];
  data_t                centre_q [N_OMF];

  always_ff @(posedge clk) begin
    if (tab_we) table_q[tab_waddr] <= tab_wdata;
    if (omf_we && omf_waddr < OMF_IDX_W'(N_OMF)) centre_q[omf_waddr] <= omf_wdata;
  end

  always_comb begin
    for (int unsigned r = 0; r < N_ACTIVE; r++) begin
      logic [OMF_IDX_W-1:0] o;
      o     = table_q[addr[r]];
      en[r] = (o < OMF_IDX_W'(N_OMF));
      y[r]  = '0;
      for (int unsigned m = 0; m < N_OMF; m++)
        if (o == OMF_IDX_W'(m)) y[r] = centre_q[m];
    end
  end

endmodule
