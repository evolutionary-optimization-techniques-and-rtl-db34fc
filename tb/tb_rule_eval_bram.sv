// tb_rule_eval_bram: fills the rule memory, then runs sequences of 16 rule
// reads: checks that `done` comes exactly 16 cycles after `start`, that every
// word is right, that the address list is latched (it is scrambled after the
// start cycle) and that a restart in the `done` cycle works.
module tb_rule_eval_bram;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we = 0, start = 0;
  rule_addr_t waddr;
  data_t      wdata;
  rule_addr_t addr [N_ACTIVE];
  data_t      y    [N_ACTIVE];
  logic       busy, done;
  int         mem [N_RULES];

  rule_eval_bram dut (.clk, .rst_n, .we, .waddr, .wdata, .start, .addr, .y, .busy, .done);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit back_to_back);
    int exp_a [N_ACTIVE];
    int lat;
    for (int r = 0; r < N_ACTIVE; r++) begin
      exp_a[r] = $urandom_range(0, N_RULES - 1);
      addr[r]  = rule_addr_t'(exp_a[r]);
    end
    start = 1;
    @(negedge clk); start = 0;
    for (int r = 0; r < N_ACTIVE; r++) addr[r] = rule_addr_t'($urandom_range(0, N_RULES - 1));
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != N_ACTIVE) begin failures++; $display("FAIL latency %0d", lat); end
    for (int r = 0; r < N_ACTIVE; r++) begin
      checks++;
      if (int'(y[r]) != mem[exp_a[r]]) begin
        failures++;
        $display("FAIL rule %0d addr %0d: %0d expected %0d", r, exp_a[r], y[r], mem[exp_a[r]]);
      end
    end
    if (!back_to_back) @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < N_ACTIVE; r++) addr[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < N_RULES; a++) begin
      @(negedge clk); we = 1; waddr = rule_addr_t'(a);
      mem[a] = $urandom_range(0, 255); wdata = data_t'(mem[a]);
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 50; t++) run(t % 2 == 1);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after the last sequence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
