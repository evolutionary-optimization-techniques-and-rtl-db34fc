// flc_top: reconfigurable fuzzy logic controller with its processor link and
// its configuration-switch initiator.
//
// The design follows the FPGA side of the FLC system:
//  * flc_core, the four-input fuzzy logic controller (crisp inputs in, crisp
//    output out) whose implementation FLC1..FLC4 is chosen by its mode
//    register and whose membership functions, rules and output centres are
//    changed through a byte-wide configuration write port;
//  * the hardware-software co-design link: a dual-port memory (dp_ram) whose
//    port A belongs to the processor (brought out as the host_* ports) and
//    whose port B is driven by codesign_bram_if, which reads the crisp inputs
//    from a mailbox, runs the FLC and writes the result back;
//  * ace_reconfig_ctrl, the embedded MPU-port master that makes the external
//    SystemACE controller reload the FPGA with one of eight bitstreams. Its
//    request and bitstream number come from outside: the internal monitor
//    that decides on a reconfiguration is not part of this design.
//
// `host_attach` (static; change it only while the FLC is idle) chooses who
// drives the FLC: 0 the crisp_in/start pins, 1 the processor through the
// shared memory. While it is 1, `ready` reads 0 and `start` is ignored; the
// result also appears on out_valid/crisp_out. Timing and handshakes of each
// part are described in its own header.
module flc_top
  import flc_pkg::*;
#(
  parameter int unsigned HOST_AW = 11   // shared memory: 2048 bytes
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_attach,
  // fuzzy inference from pins
  input  logic               start,
  output logic               ready,
  input  data_t              crisp_in [N_IN],
  output logic               out_valid,
  output data_t              crisp_out,
  output flc_mode_e          mode,
  output flc_mode_e          op_mode,
  // FLC configuration writes
  input  logic               cfg_we,
  input  logic [11:0]        cfg_addr,
  input  data_t              cfg_wdata,
  // processor port of the shared memory
  input  logic               host_en,
  input  logic               host_we,
  input  logic [HOST_AW-1:0] host_addr,
  input  data_t              host_wdata,
  output data_t              host_rdata,
  output logic               host_link_busy,
  // configuration switch through SystemACE
  input  logic               reconfig_req,
  input  logic [2:0]         reconfig_sel,
  output logic               reconfig_busy,
  output logic               reconfig_done,
  output logic [6:0]         mpu_addr,
  output logic [15:0]        mpu_data,
  output logic               mpu_cen_n,
  output logic               mpu_wen_n,
  output logic               mpu_oen_n
);

  logic               flc_start, flc_ready;
  data_t              flc_in [N_IN];

  // ------------------------------------------------ shared memory link
  logic               b_en, b_we;
  logic [HOST_AW-1:0] b_addr;
  data_t              b_wdata, b_rdata;
  logic               cd_start;
  data_t              cd_in [N_IN];

  dp_ram #(.WIDTH(DATA_W), .DEPTH(1 << HOST_AW)) u_shared (
    .clk,
    .a_en(host_en), .a_we(host_we), .a_addr(host_addr), .a_wdata(host_wdata), .a_rdata(host_rdata),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  codesign_bram_if #(.AW(HOST_AW)) u_link (
    .clk, .rst_n, .enable(host_attach),
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata), .mem_rdata(b_rdata),
    .flc_start(cd_start), .flc_ready(flc_ready), .flc_in(cd_in),
    .flc_valid(out_valid), .flc_out(crisp_out),
    .busy(host_link_busy), .done()
  );

  // ------------------------------------------------ fuzzy logic controller

  assign flc_start = host_attach ? cd_start : start;
  assign flc_in    = host_attach ? cd_in : crisp_in;
  assign ready     = flc_ready && !host_attach;

  flc_core u_flc (
    .clk, .rst_n, .start(flc_start), .ready(flc_ready), .crisp_in(flc_in),
    .out_valid, .crisp_out, .mode, .op_mode, .cfg_we, .cfg_addr, .cfg_wdata
  );

  // ------------------------------------------------ reconfiguration
  ace_reconfig_ctrl u_ace (
    .clk, .rst_n, .req(reconfig_req), .cfg_sel(reconfig_sel),
    .busy(reconfig_busy), .done(reconfig_done),
    .mpu_addr, .mpu_data, .mpu_cen_n, .mpu_wen_n, .mpu_oen_n
  );

endmodule
