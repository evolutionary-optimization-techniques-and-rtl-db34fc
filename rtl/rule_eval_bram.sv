// rule_eval_bram: rule base held in a synchronous block RAM.
//
// The memory is addressed by the concatenated member indices of the inputs
// and each word holds the centre of the output membership function the rule
// concludes (depth 2^8 = 256, width 8 bits). With one read port, each active
// rule costs one clock: the active rules are read one per cycle.
//
// Timing: in the cycle `start` is high, the address of active rule 0 is taken
// straight from `addr` and read at that clock edge; the whole address list is
// latched at the same edge and rules 1 .. N_ACTIVE-1 are read on the following
// edges. `done` is high for one cycle, N_ACTIVE cycles after `start`; in that
// cycle all of `y` is valid (the last word straight from the RAM output, the
// others from holding registers). `start` is accepted in any cycle, including
// the `done` cycle, and restarts the sequence.
//
// Write port: `we`/`waddr`/`wdata` write one word at the next edge (the
// stand-in for loading or changing the rules).
module rule_eval_bram
  import flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  rule_addr_t waddr,
  input  data_t      wdata,
  input  logic       start,
  input  rule_addr_t addr [N_ACTIVE],
  output data_t      y    [N_ACTIVE],
  output logic       busy,
  output logic       done
);

  localparam int unsigned IDX_W = $clog2(N_ACTIVE);
  localparam int unsigned CNT_W = IDX_W + 1;

  data_t       mem [N_RULES];
  data_t       rd_data;
  rule_addr_t  addr_q [N_ACTIVE];
  rule_addr_t  rd_addr;
  data_t       y_q [N_ACTIVE];
  logic [CNT_W-1:0] cnt;

  // Address of the read issued at this edge
  always_comb begin
    if (start)
      rd_addr = addr[0];
    else if (busy && cnt < CNT_W'(N_ACTIVE))
      rd_addr = addr_q[cnt[CNT_W-2:0]];
    else
      rd_addr = addr_q[N_ACTIVE-1];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rd_data <= mem[rd_addr];
  end

  assign done = busy && (cnt == CNT_W'(N_ACTIVE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= CNT_W'(1);
    end else if (busy) begin
      if (done) busy <= 1'b0;
      else      cnt  <= cnt + CNT_W'(1);
    end
  end

  // Address list and the words that have arrived
  always_ff @(posedge clk) begin
    if (start) addr_q <= addr;
    if (busy && cnt != '0) y_q[IDX_W'(cnt - CNT_W'(1))] <= rd_data;
  end

  always_comb begin
    for (int unsigned r = 0; r < N_ACTIVE - 1; r++) y[r] = y_q[r];
    y[N_ACTIVE-1] = done ? rd_data : y_q[N_ACTIVE-1];
  end

endmodule
