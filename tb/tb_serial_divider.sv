// tb_serial_divider: random numerator/denominator pairs whose quotient fits
// 16 bits (as a centre of gravity does), checking quotient and the latency of
// 16 clocks, with and without back-to-back starts.
module tb_serial_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [19:0] num;
  logic [11:0] den;
  logic        busy, done;
  logic [15:0] quot;

  serial_divider #(.NUM_W(20), .DEN_W(12), .DIV_W(16)) dut
    (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, d, lat;
    num = '0; den = 12'd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      d = $urandom_range(1, 4095);
      case (t % 3)
        0: n = $urandom_range(0, 255) * d + $urandom_range(0, d - 1);  // COG-like
        1: n = $urandom_range(0, 65535);
        default: n = d * 255 + d - 1;
      endcase
      if (n > 20'hFFFFF) n = 20'hFFFFF;
      if ((n >> 16) >= d) n = d * 16;
      num = 20'(n); den = 12'(d);
      start = 1;
      @(negedge clk); start = 0;
      num = 20'($urandom); den = 12'($urandom_range(1, 4095));  // must not matter
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 16) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (int'(quot) != n / d) begin
        failures++;
        $display("FAIL %0d / %0d = %0d, got %0d", n, d, n / d, quot);
      end
      if (t % 2 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
