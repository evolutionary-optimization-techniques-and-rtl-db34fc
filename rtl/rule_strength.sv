// rule_strength: enumerates the active rules and their firing degrees.
//
// Every input has OVERLAP (= 2) active members, so OVERLAP^N_IN (= 16) rules
// fire. Active rule r takes, for input j, member bit j of r: 0 selects the
// lower of the two active members, 1 the upper one. Its rule-base address is
// the concatenation of the chosen member indices, input 0 in the least
// significant bits (the "Member1 & Member2 & ..." address of the rule memory).
// Its firing degree is the minimum of the chosen degrees: the "Min" half of
// the Min-Max inference. The "Max" half is done by the first-of-maxima
// defuzzifier; the centre-of-gravity defuzzifier weights every active rule.
// The bit-per-input rule ordering is this design's own choice.
//
// Purely combinational.
module rule_strength
  import flc_pkg::*;
(
  input  mf_idx_t    idx      [N_IN][OVERLAP],
  input  data_t      deg      [N_IN][OVERLAP],
  output rule_addr_t addr     [N_ACTIVE],
  output data_t      strength [N_ACTIVE]
);

  always_comb begin
    for (int unsigned r = 0; r < N_ACTIVE; r++) begin
      addr[r]     = '0;
      strength[r] = '1;
      for (int unsigned j = 0; j < N_IN; j++) begin
        addr[r][j*MF_IDX_W +: MF_IDX_W] = idx[j][r[j]];
        if (deg[j][r[j]] < strength[r]) strength[r] = deg[j][r[j]];
      end
    end
  end

endmodule
