// tb_cog_defuzz: random centres and degrees; checks the centre of gravity
// sum(w*y)/sum(w) (floor), the output 0 when every degree is zero, and the
// latency of 16 clocks.
module tb_cog_defuzz;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start = 0;
  data_t y [N_ACTIVE];
  data_t w [N_ACTIVE];
  logic  busy, done;
  data_t out;

  cog_defuzz dut (.clk, .rst_n, .start, .y, .w, .busy, .done, .out);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint num, den;
    int exp, lat;
    for (int r = 0; r < N_ACTIVE; r++) begin y[r] = '0; w[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      num = 0; den = 0;
      for (int r = 0; r < N_ACTIVE; r++) begin
        y[r] = data_t'($urandom_range(0, 255));
        w[r] = (t % 50 == 7) ? '0 : data_t'((t % 5 == 0) ? 255 : $urandom_range(0, 255));
        num += longint'(w[r]) * longint'(y[r]);
        den += longint'(w[r]);
      end
      exp = (den == 0) ? 0 : int'(num / den);
      start = 1;
      @(negedge clk); start = 0;
      for (int r = 0; r < N_ACTIVE; r++) begin y[r] = data_t'($urandom); w[r] = data_t'($urandom); end
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != DIV_W) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (int'(out) != exp) begin failures++; $display("FAIL out %0d expected %0d", out, exp); end
      @(negedge clk);
      checks++;
      if (int'(out) != exp) begin failures++; $display("FAIL out not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
