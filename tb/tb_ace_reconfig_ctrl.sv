// tb_ace_reconfig_ctrl: requests switches to each of the eight bitstreams and
// records every MPU write (sampled when WEN rises): two writes per request
// to the control register, the first with the configuration reset bit set and
// the second with it clear, both forcing CFGADDR to the requested number.
// Also checks the write-strobe width and that a request while busy is ignored.
module tb_ace_reconfig_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req = 0;
  logic [2:0]  cfg_sel;
  logic        busy, done;
  logic [6:0]  mpu_addr;
  logic [15:0] mpu_data;
  logic        mpu_cen_n, mpu_wen_n, mpu_oen_n;

  ace_reconfig_ctrl dut (.clk, .rst_n, .req, .cfg_sel, .busy, .done,
                         .mpu_addr, .mpu_data, .mpu_cen_n, .mpu_wen_n, .mpu_oen_n);

  int         nwr = 0, wen_low = 0;
  logic [15:0] wr_data [$];
  logic [6:0]  wr_addr [$];
  int          wen_width [$];

  always @(posedge clk) begin
    if (!mpu_wen_n) begin
      wen_low++;
      if (mpu_cen_n) begin failures++; $display("FAIL WEN low with CEN high"); end
    end else if (wen_low != 0) begin
      wen_width.push_back(wen_low);
      wen_low = 0;
    end
    if (!mpu_oen_n) begin failures++; $display("FAIL OEN asserted"); end
  end

  always @(posedge mpu_wen_n) if (rst_n) begin
    wr_data.push_back(mpu_data);
    wr_addr.push_back(mpu_addr);
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    cfg_sel = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      logic [15:0] base;
      wr_data.delete(); wr_addr.delete(); wen_width.delete();
      cfg_sel = 3'(s); req = 1;
      @(negedge clk); req = 0; cfg_sel = 3'(7 - s);
      @(negedge clk); req = 1;   // ignored while busy
      @(negedge clk); req = 0;
      cyc = 0;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      @(negedge clk);
      base = 16'(s) << 13 | 16'h0004;
      checks++;
      if (wr_data.size() != 2) begin
        failures++; $display("FAIL %0d writes for one request", wr_data.size());
      end else begin
        checks += 3;
        if (wr_data[0] != (base | 16'h0080)) begin failures++; $display("FAIL first write %h", wr_data[0]); end
        if (wr_data[1] != base) begin failures++; $display("FAIL second write %h", wr_data[1]); end
        if (wr_addr[0] != 7'h18 || wr_addr[1] != 7'h18) begin failures++; $display("FAIL address"); end
        checks++;
        if (wen_width.size() != 2 || wen_width[0] != 2 || wen_width[1] != 2) begin
          failures++; $display("FAIL write strobe widths");
        end
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
