// tb_dp_ram: random reads and writes on both ports against a model array;
// checks the one-cycle read latency, read-before-write and that port A wins a
// same-address write collision.
module tb_dp_ram;
  localparam int W = 8, D = 64, AW = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0]  a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int model [D];

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    bit ca, cb;
    // fill through port B, every word
    for (int i = 0; i < D; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = AW'(i); model[i] = $urandom_range(0, 255);
      b_wdata = W'(model[i]);
    end
    @(negedge clk); b_en = 0; b_we = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_we = ($urandom_range(0, 2) == 0); b_we = ($urandom_range(0, 2) == 0);
      a_addr = AW'($urandom_range(0, (t % 4 == 0) ? 3 : D - 1));
      b_addr = (t % 5 == 0) ? a_addr : AW'($urandom_range(0, D - 1));
      a_wdata = W'($urandom); b_wdata = W'($urandom);
      ea = model[a_addr]; eb = model[b_addr];
      if (b_we && !(a_we && a_addr == b_addr)) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      @(posedge clk); #1;
      checks += 2;
      if (int'(a_rdata) != ea) begin failures++; $display("FAIL A read %0d: %0d expected %0d", a_addr, a_rdata, ea); end
      if (int'(b_rdata) != eb) begin failures++; $display("FAIL B read %0d: %0d expected %0d", b_addr, b_rdata, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
