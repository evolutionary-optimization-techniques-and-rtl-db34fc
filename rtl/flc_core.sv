// flc_core: four-input fuzzy logic controller with selectable implementation.
//
// Data flow: four fuzzifiers map the crisp inputs onto their two overlapping
// membership functions; rule_strength enumerates the 16 active rules (rule
// address and Min degree); a rule base gives each active rule the centre of
// its output membership function; a defuzzifier turns the 16 (centre, degree)
// pairs into the crisp output.
//
// The FLC design offers two rule bases (combinational logic, or a block RAM
// read one active rule per clock) and two defuzzifiers (centre of gravity
// with a 16-clock divider, or first of maxima), giving the four controllers
// FLC1..FLC4. On an FPGA one of them is loaded at a time and swapped by
// reconfiguring the rule-base or defuzzifier module. Here all of them are
// present and the mode register selects which path an inference takes; the
// mode is sampled when an inference starts, so it can be changed between
// inferences. Latency from `start` to `out_valid` in clock cycles:
//   FLC1 comb + COG : 16   (divider)
//   FLC2 comb + FOM :  1
//   FLC3 BRAM + COG : 32   (16 rule reads + divider)
//   FLC4 BRAM + FOM : 16   (16 rule reads)
//
// Handshake (this design's choice): an inference starts at a rising edge with
// `start` and `ready` high; `crisp_in` must be valid in that cycle only.
// `out_valid` is high for one cycle with the result on `crisp_out`;
// `crisp_out` then holds that result until the next one. `ready` is high when
// idle and also in the `out_valid` cycle, so inferences can run back to back
// at one per latency; the one exception is the last cycle of an FLC4
// inference when the mode register has meanwhile been set to FLC1 or FLC2
// (both need the shared FOM/selection path then), which costs one cycle.
// `start` may be held high until `ready` accepts it.
//
// Configuration write port (difference-based changes: membership-function key
// points and slopes, rules, output centres, mode): one byte per clock at
// `cfg_addr`, see the map in flc_pkg. Membership-function bytes are at
// CFG_MF_BASE + input*28 + function*7 + field, fields in the order left,
// tleft, tright, right, height, slope_l, slope_r. Configuration registers and
// rule tables have no reset and must be written before the first inference;
// only the mode resets (to FLC1).
module flc_core
  import flc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // inference
  input  logic        start,
  output logic        ready,
  input  data_t       crisp_in [N_IN],
  output logic        out_valid,
  output data_t       crisp_out,
  output flc_mode_e   mode,        // mode register (next inference)
  output flc_mode_e   op_mode,     // mode of the inference in progress / last
  // configuration write
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  data_t       cfg_wdata
);

  // ---------------------------------------------------------------- config
  mf_param_t mf_q [N_IN][N_MF];
  flc_mode_e mode_q;

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      for (int unsigned i = 0; i < N_IN; i++)
        for (int unsigned m = 0; m < N_MF; m++)
          for (int unsigned f = 0; f < MF_FIELDS; f++)
            if (cfg_addr == CFG_MF_BASE + 12'((i * N_MF + m) * MF_FIELDS + f))
              case (f)
                0: mf_q[i][m].left    <= cfg_wdata;
                1: mf_q[i][m].tleft   <= cfg_wdata;
                2: mf_q[i][m].tright  <= cfg_wdata;
                3: mf_q[i][m].right   <= cfg_wdata;
                4: mf_q[i][m].height  <= cfg_wdata;
                5: mf_q[i][m].slope_l <= cfg_wdata;
                default: mf_q[i][m].slope_r <= cfg_wdata;
              endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 mode_q <= FLC1_COMB_COG;
    else if (cfg_we && cfg_addr == CFG_MODE_ADDR) mode_q <= flc_mode_e'(cfg_wdata[1:0]);
  end
  assign mode = mode_q;

  logic bram_we, tab_we, omf_we;
  assign bram_we = cfg_we && cfg_addr[11:8] == CFG_BRAM_BASE[11:8];
  assign tab_we  = cfg_we && cfg_addr[11:8] == CFG_COMB_BASE[11:8];
  assign omf_we  = cfg_we && cfg_addr >= CFG_OMF_BASE
                          && cfg_addr <  CFG_OMF_BASE + 12'(N_OMF);

  // ---------------------------------------------------- fuzzify + strengths
  mf_idx_t    idx [N_IN][OVERLAP];
  data_t      deg [N_IN][OVERLAP];
  rule_addr_t rule_addr [N_ACTIVE];
  data_t      strength  [N_ACTIVE];

  for (genvar i = 0; i < N_IN; i++) begin : g_fuzz
    fuzzifier u_fuzz (.x(crisp_in[i]), .mf(mf_q[i]), .idx(idx[i]), .deg(deg[i]));
  end

  rule_strength u_strength (.idx, .deg, .addr(rule_addr), .strength);

  // -------------------------------------------------------------- control
  logic      busy_q, accept;
  flc_mode_e op_q;
  logic      comb_rules;

  // rule base / defuzzifier of the inference being started
  assign comb_rules = (mode_q == FLC1_COMB_COG) || (mode_q == FLC2_COMB_FOM);
  // A new inference may start in the out_valid cycle of the last one, except
  // when an FLC4 result (FOM over the RAM words) is being produced and the new
  // one needs the FOM unit for the combinational rules in the same cycle.
  assign ready  = !busy_q || (out_valid && !(op_q == FLC4_BRAM_FOM && comb_rules));
  assign accept = start && ready;

  // --------------------------------------------------- combinational rules
  data_t y_comb [N_ACTIVE];
  logic  en_comb [N_ACTIVE];
  data_t w_comb [N_ACTIVE];

  rule_eval_comb u_comb (
    .clk,
    .tab_we, .tab_waddr(cfg_addr[RULE_AW-1:0]), .tab_wdata(cfg_wdata[OMF_IDX_W-1:0]),
    .omf_we, .omf_waddr(OMF_IDX_W'(cfg_addr - CFG_OMF_BASE)), .omf_wdata(cfg_wdata),
    .addr(rule_addr), .y(y_comb), .en(en_comb)
  );

  always_comb
    for (int unsigned r = 0; r < N_ACTIVE; r++)
      w_comb[r] = en_comb[r] ? strength[r] : '0;

  // ------------------------------------------------------ block-RAM rules
  data_t y_bram [N_ACTIVE];
  data_t w_q    [N_ACTIVE];
  logic  bram_start, bram_done;

  assign bram_start = accept && !comb_rules;

  rule_eval_bram u_bram (
    .clk, .rst_n,
    .we(bram_we), .waddr(cfg_addr[RULE_AW-1:0]), .wdata(cfg_wdata),
    .start(bram_start), .addr(rule_addr), .y(y_bram),
    .busy(), .done(bram_done)
  );

  always_ff @(posedge clk)
    if (bram_start) w_q <= strength;

  // -------------------------------------------------------- defuzzifiers
  // In the start cycle of a combinational-rule inference the defuzzifiers
  // see the live rule outputs; otherwise the block-RAM words.
  data_t y_sel [N_ACTIVE];
  data_t w_sel [N_ACTIVE];
  data_t fom_out, cog_out;
  logic  cog_start, cog_done;
  logic  sel_comb;

  assign sel_comb = accept ? comb_rules : 1'b0;
  always_comb begin
    for (int unsigned r = 0; r < N_ACTIVE; r++) begin
      y_sel[r] = sel_comb ? y_comb[r] : y_bram[r];
      w_sel[r] = sel_comb ? w_comb[r] : w_q[r];
    end
  end

  assign cog_start = (accept && mode_q == FLC1_COMB_COG)
                  || (bram_done && op_q == FLC3_BRAM_COG);

  cog_defuzz u_cog (
    .clk, .rst_n, .start(cog_start), .y(y_sel), .w(w_sel),
    .busy(), .done(cog_done), .out(cog_out)
  );

  fom_defuzz u_fom (.y(y_sel), .w(w_sel), .out(fom_out));

  // ------------------------------------------------------------ sequencing
  data_t fom2_q, last_q;
  logic  fom2_valid_q;
  data_t result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      op_q         <= FLC1_COMB_COG;
      fom2_valid_q <= 1'b0;
    end else begin
      fom2_valid_q <= accept && mode_q == FLC2_COMB_FOM;
      if (accept) begin
        busy_q <= 1'b1;
        op_q   <= mode_q;
      end else if (out_valid) begin
        busy_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && mode_q == FLC2_COMB_FOM) fom2_q <= fom_out;
    if (out_valid) last_q <= result;
  end

  always_comb begin
    unique case (op_q)
      FLC1_COMB_COG, FLC3_BRAM_COG: begin out_valid = busy_q && cog_done;  result = cog_out; end
      FLC2_COMB_FOM:                begin out_valid = busy_q && fom2_valid_q; result = fom2_q; end
      default:                      begin out_valid = busy_q && bram_done; result = fom_out; end
    endcase
  end

  assign crisp_out = out_valid ? result : last_q;
  assign op_mode   = op_q;

endmodule
