// ace_reconfig_ctrl: in-FPGA initiator of a configuration switch through the
// SystemACE microprocessor (MPU) port.
//
// The board selects one of eight bitstreams on the CompactFlash through the
// three CFGADDR pins of the SystemACE controller. A control register reached
// over the MPU port can override those pins; writing it with a new address
// and re-triggering the configuration reset makes the controller reload the
// whole FPGA from the chosen file. This block is the small MPU master that is
// embedded in every bitstream for that purpose. On `req` (from an internal
// monitor, or a user) it latches `cfg_sel` and performs two register writes:
//   1. CONTROL = FORCECFGADDR | CFGADDR(cfg_sel) | CFGRESET   (hold in reset)
//   2. CONTROL = FORCECFGADDR | CFGADDR(cfg_sel)              (release: load)
// then raises `done` for one cycle. After the second write the controller
// clears and reloads the FPGA, which removes this block with the rest of the
// design: the interface destroys itself.
//
// The register address and bit positions of the SystemACE control register
// and the MPU bus timing are those of the vendor device and are parameters
// here; their defaults are this design's assumption, not part of the FLC
// design. Each write drives address and data with CEN low for one setup
// cycle, WEN low for WR_CYCLES cycles, then one hold cycle with WEN high.
// OEN stays high (the block never reads).
module ace_reconfig_ctrl #(
  parameter logic [6:0]  CTRL_ADDR       = 7'h18,
  parameter int unsigned BIT_FORCECFGADDR = 2,
  parameter int unsigned BIT_CFGRESET     = 7,
  parameter int unsigned CFGADDR_LSB      = 13,
  parameter int unsigned WR_CYCLES        = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,        // start a configuration switch
  input  logic [2:0]  cfg_sel,    // bitstream 0..7 to load
  output logic        busy,
  output logic        done,
  // SystemACE MPU port
  output logic [6:0]  mpu_addr,
  output logic [15:0] mpu_data,
  output logic        mpu_cen_n,
  output logic        mpu_wen_n,
  output logic        mpu_oen_n
);

  typedef enum logic [2:0] {IDLE, SETUP, STROBE, HOLD, FINISH} state_e;

  localparam int unsigned WC_W = $clog2(WR_CYCLES + 1);

  state_e           state;
  logic [2:0]       sel_q;
  logic             second;      // 0: first write, 1: second write
  logic [WC_W-1:0]  wcnt;
  logic [15:0]      ctrl_word;

  always_comb begin
    ctrl_word = '0;
    ctrl_word[BIT_FORCECFGADDR]          = 1'b1;
    ctrl_word[CFGADDR_LSB +: 3]          = sel_q;
    ctrl_word[BIT_CFGRESET]              = !second;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      sel_q  <= '0;
      second <= 1'b0;
      wcnt   <= '0;
    end else begin
      unique case (state)
        IDLE:   if (req) begin
                  sel_q  <= cfg_sel;
                  second <= 1'b0;
                  state  <= SETUP;
                end
        SETUP:  begin wcnt <= WC_W'(1); state <= STROBE; end
        STROBE: if (wcnt == WC_W'(WR_CYCLES)) state <= HOLD;
                else wcnt <= wcnt + WC_W'(1);
        HOLD:   if (second) state <= FINISH;
                else begin second <= 1'b1; state <= SETUP; end
        FINISH: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign busy      = (state != IDLE);
  assign done      = (state == FINISH);
  assign mpu_cen_n = !(state == SETUP || state == STROBE || state == HOLD);
  assign mpu_wen_n = !(state == STROBE);
  assign mpu_oen_n = 1'b1;
  assign mpu_addr  = mpu_cen_n ? '0 : CTRL_ADDR;
  assign mpu_data  = mpu_cen_n ? '0 : ctrl_word;

  // Address and data are stable while write enable is low
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    !mpu_wen_n && $past(!mpu_wen_n) |-> $stable(mpu_data) && $stable(mpu_addr));

endmodule
