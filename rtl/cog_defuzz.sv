// cog_defuzz: centre-of-gravity defuzzifier.
//
// out = sum(w_i * y_i) / sum(w_i) over the active rules. One multiplier per
// active rule forms the products; two adder trees form numerator and
// denominator (all combinational), and a serial_divider, the only synchronous
// part, forms the quotient. The latency is therefore the divider width,
// DIV_W (16) clocks: `done` is high for one cycle DIV_W cycles after `start`,
// with `out` valid then and held until the next `start`. When every weight is
// zero the output is 0 (this design's choice; the formula is undefined there).
// `y` and `w` need only be valid in the `start` cycle.
module cog_defuzz
  import flc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  data_t y [N_ACTIVE],
  input  data_t w [N_ACTIVE],
  output logic  busy,
  output logic  done,
  output data_t out
);

  logic [NUM_W-1:0] num;
  logic [DEN_W-1:0] den;
  logic [DIV_W-1:0] quot;
  logic             zero_q;

  always_comb begin
    num = '0;
    den = '0;
    for (int unsigned r = 0; r < N_ACTIVE; r++) begin
      num += NUM_W'(w[r]) * NUM_W'(y[r]);
      den += DEN_W'(w[r]);
    end
  end

  serial_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .DIV_W(DIV_W)) u_div (
    .clk, .rst_n, .start, .num, .den, .busy, .done, .quot
  );

  always_ff @(posedge clk) if (start) zero_q <= (den == '0);

  // A weighted average never exceeds 255; the upper quotient bits only
  // guard against a numerator that breaks that rule (saturate).
  assign out = zero_q             ? '0 :
               |quot[DIV_W-1:DATA_W] ? '1 : quot[DATA_W-1:0];

endmodule
