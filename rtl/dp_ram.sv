// dp_ram: true dual-port synchronous RAM, the memory shared between the
// processor and the FPGA logic in the hardware-software co-design
// architecture.
//
// Both ports can read and write every word independently in every cycle.
// A read returns the word at the address of the previous clock edge (one
// cycle latency, read-before-write on the same port). When both ports write
// the same word in the same cycle, port A wins (this design's choice; the
// FLC design does not say). Width and depth are parameters; the defaults
// (2048 x 8 bits, one 16-kbit block RAM) are this design's choice.
module dp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A (processor)
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B (FPGA logic)
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end

endmodule
