// codesign_bram_if: BRAM interface controller that lets a processor use the
// fuzzy logic controller through the shared dual-port memory.
//
// In the co-design architecture the processor and the FPGA logic exchange
// data only through a dual-port memory: the processor works on port A, this
// controller on port B. The mailbox layout and protocol are this design's
// choice (the FLC design gives only the structure):
//   BASE+0  command/status: the processor writes 8'h01 to request an
//           inference; the controller writes 8'h02 when the result is ready
//   BASE+1 .. BASE+4  the four crisp inputs
//   BASE+5  the crisp output
// The controller polls the command byte. On a request it reads the four
// inputs (one word per clock through the synchronous port), starts the FLC,
// waits for its result, writes it to BASE+5 and then writes the status.
// FLC side: `flc_start` is held until `flc_ready` accepts it; `flc_in` stays
// valid meanwhile.
module codesign_bram_if
  import flc_pkg::*;
#(
  parameter int unsigned AW   = 11,
  parameter logic [AW-1:0] BASE = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,      // 0: controller idles, port B unused
  // port B of the shared memory
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output data_t         mem_wdata,
  input  data_t         mem_rdata,
  // fuzzy logic controller
  output logic          flc_start,
  input  logic          flc_ready,
  output data_t         flc_in [N_IN],
  input  logic          flc_valid,
  input  data_t         flc_out,
  // status
  output logic          busy,
  output logic          done         // one cycle, status written
);

  localparam data_t CMD_REQ  = 8'h01;
  localparam data_t CMD_DONE = 8'h02;

  typedef enum logic [2:0] {POLL, CHECK, LOAD, RUN, WAIT, WR_OUT, WR_STAT} state_e;

  state_e      state;
  logic [2:0]  cnt;      // input being read
  data_t       in_q [N_IN];
  data_t       res_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= POLL;
      cnt   <= '0;
      res_q <= '0;
      for (int i = 0; i < N_IN; i++) in_q[i] <= '0;
    end else begin
      unique case (state)
        POLL:    if (enable) state <= CHECK;          // command byte read issued
        CHECK:   if (mem_rdata == CMD_REQ) begin
                   state <= LOAD;
                   cnt   <= 3'd1;                     // read of BASE+1 issued
                 end else state <= POLL;
        LOAD:    begin
                   // word cnt-1 arrives while word cnt is read
                   if (cnt >= 3'd2) in_q[2'(cnt - 3'd2)] <= mem_rdata;
                   if (cnt == 3'(N_IN + 1)) state <= RUN;
                   else cnt <= cnt + 3'd1;
                 end
        RUN:     if (flc_ready) state <= WAIT;
        WAIT:    if (flc_valid) begin res_q <= flc_out; state <= WR_OUT; end
        WR_OUT:  state <= WR_STAT;
        WR_STAT: state <= POLL;
        default: state <= POLL;
      endcase
    end
  end

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = BASE;
    mem_wdata = '0;
    unique case (state)
      POLL:    mem_en = enable;
      LOAD:    if (cnt <= 3'(N_IN)) begin mem_en = 1'b1; mem_addr = BASE + AW'(cnt); end
      WR_OUT:  begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = BASE + AW'(N_IN + 1); mem_wdata = res_q; end
      WR_STAT: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = BASE; mem_wdata = CMD_DONE; end
      default: ;
    endcase
  end

  assign flc_start = (state == RUN);
  assign flc_in    = in_q;
  assign busy      = !(state == POLL || state == CHECK);
  assign done      = (state == WR_STAT);

endmodule
