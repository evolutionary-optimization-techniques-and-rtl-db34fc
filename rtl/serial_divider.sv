// serial_divider: synchronous restoring divider, one quotient bit per clock.
//
// Divides an NUM_W-bit numerator by a DEN_W-bit denominator and returns a
// DIV_W-bit quotient. Its latency equals its width: DIV_W clock edges, the
// first of them the edge that samples `start`. `done` is high for one cycle,
// DIV_W cycles after `start`, with `quot` valid from then until the next start.
//
// Only the low DIV_W quotient bits are formed, so the caller must ensure
// num >> DIV_W < den (true for a centre of gravity, whose quotient is a
// weighted average of 8-bit values). The remainder starts as the top
// NUM_W-DIV_W numerator bits and the low DIV_W bits are shifted in one per
// step. With den == 0 the quotient is all ones. Being a plain bit-serial
// divider rather than a pipelined one is this design's choice; the latency
// equal to the divider width is what the FLC design states.
module serial_divider #(
  parameter int unsigned NUM_W = 20,
  parameter int unsigned DEN_W = 12,
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [DIV_W-1:0] quot
);

  localparam int unsigned HI_W  = NUM_W - DIV_W;
  localparam int unsigned CNT_W = $clog2(DIV_W + 1);

  typedef struct packed {
    logic [DEN_W-1:0] rem;
    logic [DIV_W-1:0] q;    // dividend bits still to shift, quotient bits in
  } div_state_t;

  div_state_t       st, st_init, st_next, st_first;
  logic [DEN_W-1:0] den_q;
  logic [CNT_W-1:0] cnt;

  function automatic div_state_t step(div_state_t s, logic [DEN_W-1:0] d);
    logic [DEN_W:0] trial;
    div_state_t     n;
    trial = {s.rem, s.q[DIV_W-1]} - {1'b0, d};
    if (!trial[DEN_W]) n.rem = trial[DEN_W-1:0];
    else               n.rem = {s.rem[DEN_W-2:0], s.q[DIV_W-1]};
    n.q = {s.q[DIV_W-2:0], ~trial[DEN_W]};
    return n;
  endfunction

  always_comb begin
    st_init.rem = DEN_W'(num[NUM_W-1:DIV_W]);
    st_init.q   = num[DIV_W-1:0];
    st_first    = step(st_init, den);
    st_next     = step(st, den_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= (DIV_W > 1);
        done <= (DIV_W == 1);
        cnt  <= CNT_W'(1);
      end else if (busy) begin
        cnt <= cnt + CNT_W'(1);
        if (cnt == CNT_W'(DIV_W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      st    <= st_first;
      den_q <= den;
    end else if (busy) begin
      st <= st_next;
    end
  end

  assign quot = st.q;

  // The quotient must fit in DIV_W bits
  property p_fits;
    @(posedge clk) disable iff (!rst_n)
      start && den != '0 |-> (DEN_W'(num >> DIV_W) < den);
  endproperty
  a_fits: assert property (p_fits);

  if (HI_W > DEN_W) begin : g_bad
    $error("serial_divider: NUM_W - DIV_W must not exceed DEN_W");
  end

endmodule
