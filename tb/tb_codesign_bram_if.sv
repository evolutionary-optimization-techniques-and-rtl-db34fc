// tb_codesign_bram_if: the controller runs against a dual-port memory and a
// stand-in FLC in the testbench (result = sum of the inputs mod 256, after a
// random delay, with a random ready). The testbench plays the processor on
// port A: writes inputs and the request, polls the status byte, reads the
// result. Checks results, status, that the controller stays idle when not
// enabled and that the FLC inputs reach it unchanged.
module tb_codesign_bram_if;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int AW = 11;
  logic          enable = 0;
  logic          a_en = 0, a_we = 0;
  logic [AW-1:0] a_addr = '0;
  data_t         a_wdata = '0, a_rdata;
  logic          mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  data_t         mem_wdata, mem_rdata;
  logic          flc_start, flc_ready, flc_valid = 0;
  data_t         flc_in [N_IN];
  data_t         flc_out = '0;
  logic          busy, done;

  dp_ram #(.WIDTH(8), .DEPTH(1 << AW)) u_mem (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(mem_en), .b_we(mem_we), .b_addr(mem_addr), .b_wdata(mem_wdata), .b_rdata(mem_rdata));

  codesign_bram_if #(.AW(AW), .BASE(11'h040)) dut (.*);

  // stand-in FLC
  int n_started = 0;
  logic flc_busy = 0;
  assign flc_ready = !flc_busy && ($urandom_range(0, 2) != 0);
  initial begin
    forever begin
      @(posedge clk);
      if (flc_start && flc_ready) begin
        int s;
        s = 0;
        for (int i = 0; i < N_IN; i++) s += int'(flc_in[i]);
        n_started++;
        flc_busy <= 1;
        repeat ($urandom_range(1, 20)) @(posedge clk);
        flc_out <= data_t'(s); flc_valid <= 1;
        @(posedge clk);
        flc_valid <= 0; flc_busy <= 0;
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(int a, int v);
    @(negedge clk); a_en = 1; a_we = 1; a_addr = AW'(a); a_wdata = data_t'(v);
    @(negedge clk); a_en = 0; a_we = 0;
  endtask

  task automatic host_read(int a, output int v);
    @(negedge clk); a_en = 1; a_we = 0; a_addr = AW'(a);
    @(negedge clk); a_en = 0; v = int'(a_rdata);
  endtask

  initial begin
    int x[4], s, st, res, guard;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // not enabled: a request is left alone
    host_write('h40, 1);
    repeat (30) @(negedge clk);
    host_read('h40, st);
    checks++;
    if (st != 1 || n_started != 0) begin failures++; $display("FAIL acted while disabled"); end
    for (int t = 0; t < 200; t++) begin
      s = 0;
      for (int i = 0; i < 4; i++) begin
        x[i] = $urandom_range(0, 255); s += x[i];
        host_write('h41 + i, x[i]);
      end
      // the first request has been pending since before the enable
      if (t > 0) host_write('h40, 1);
      else enable = 1;
      guard = 0;
      do begin host_read('h40, st); guard++; end while (st != 2 && guard < 200);
      host_read('h45, res);
      checks += 2;
      if (st != 2) begin failures++; $display("FAIL no status"); end
      if (res != s % 256) begin failures++; $display("FAIL result %0d expected %0d", res, s % 256); end
    end
    checks++;
    if (n_started != 200) begin failures++; $display("FAIL %0d FLC starts", n_started); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
