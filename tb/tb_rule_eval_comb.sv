// tb_rule_eval_comb: loads a random rule table (including nullified rules)
// and output centres through the write ports, then checks the 16 parallel
// look-ups for random address sets, and that a rewrite takes effect.
module tb_rule_eval_comb;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                 tab_we = 0, omf_we = 0;
  rule_addr_t           tab_waddr;
  logic [OMF_IDX_W-1:0] tab_wdata, omf_waddr;
  data_t                omf_wdata;
  rule_addr_t           addr [N_ACTIVE];
  data_t                y    [N_ACTIVE];
  logic                 en   [N_ACTIVE];

  int tab [N_RULES];
  int cen [N_OMF];

  rule_eval_comb dut (.clk, .tab_we, .tab_waddr, .tab_wdata, .omf_we, .omf_waddr,
                      .omf_wdata, .addr, .y, .en);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_tab(int a, int v);
    @(negedge clk); tab_we = 1; tab_waddr = rule_addr_t'(a); tab_wdata = OMF_IDX_W'(v);
    @(negedge clk); tab_we = 0;
    tab[a] = v;
  endtask

  task automatic check_all();
    #1;
    for (int r = 0; r < N_ACTIVE; r++) begin
      int a = int'(addr[r]);
      int ee = (tab[a] < N_OMF) ? 1 : 0;
      int ey = ee ? cen[tab[a]] : 0;
      checks++;
      if (int'(en[r]) != ee || int'(y[r]) != ey) begin
        failures++;
        $display("FAIL rule %0d addr %0d: y=%0d en=%0d expected %0d %0d", r, a, y[r], en[r], ey, ee);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < N_OMF; m++) begin
      @(negedge clk); omf_we = 1; omf_waddr = OMF_IDX_W'(m);
      cen[m] = 20 + 50 * m;
      omf_wdata = data_t'(cen[m]);
    end
    @(negedge clk); omf_we = 0;
    for (int a = 0; a < N_RULES; a++)
      write_tab(a, ($urandom_range(0, 9) == 0) ? 7 : $urandom_range(0, N_OMF - 1));
    for (int t = 0; t < 300; t++) begin
      for (int r = 0; r < N_ACTIVE; r++) addr[r] = rule_addr_t'($urandom_range(0, N_RULES - 1));
      check_all();
    end
    // rewrite one rule that is being looked up
    write_tab(int'(addr[3]), (tab[int'(addr[3])] + 1) % N_OMF);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
