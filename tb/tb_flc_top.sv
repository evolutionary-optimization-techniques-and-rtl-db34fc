// tb_flc_top: end-to-end test of the reconfigurable fuzzy logic controller.
//
// Loads random membership functions (four per input, ordered, some
// triangular), five output centres, a random combinational rule table with
// some nullified rules, and a random block-RAM rule base. Then, in each of
// the four implementations FLC1..FLC4, runs random inferences, some back to
// back, comparing every crisp output with the reference model and every
// latency with 16 / 1 / 32 / 16 clocks. It also changes a membership function
// and a rule between inferences, drives an input into a gap where no
// membership function is active (centre of gravity with zero weight), checks
// that the output holds, and requests a configuration switch through the
// SystemACE MPU port.
// Back-to-back starts must be taken in the out_valid cycle (except after
// FLC4 when the next inference uses the combinational rules), and the mode
// is also changed while an inference runs. A monitor compares crisp_out
// with the expected result at the clock edge ending each out_valid cycle.
// Finally the processor path is used: the testbench
// writes inputs and a request into the shared memory, polls the status byte
// and reads the result, in every mode. Each of these events is counted; one that never happens
// counts as a failure.
module tb_flc_top;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int N_PER_MODE = 150;
  localparam int LAT [4] = '{16, 1, 32, 16};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, ready, out_valid;
  data_t       crisp_in [N_IN];
  data_t       crisp_out;
  flc_mode_e   mode, op_mode;
  logic        cfg_we = 0;
  logic [11:0] cfg_addr;
  data_t       cfg_wdata;
  logic        host_attach = 0;
  logic        host_en = 0, host_we = 0;
  logic [10:0] host_addr = '0;
  data_t       host_wdata = '0, host_rdata;
  logic        host_link_busy;
  logic        reconfig_req = 0;
  logic [2:0]  reconfig_sel = '0;
  logic        reconfig_busy, reconfig_done;
  logic [6:0]  mpu_addr;
  logic [15:0] mpu_data;
  logic        mpu_cen_n, mpu_wen_n, mpu_oen_n;

  flc_top dut (.*);

  // model state
  ref_mf_t mf [4][4];
  int comb_tab [256];
  int centres [5];
  int bram [256];

  // event counters
  int n_mode [4];
  int n_blocked = 0, n_busy_switch = 0;
  int last_md = 0;   // mode of the previous inference
  int n_switch = 0, n_b2b = 0, n_null = 0, n_zero = 0, n_mf_change = 0;
  int n_rule_change = 0, n_hold = 0, n_reconfig = 0, n_host = 0;

  // Every result, as sampled at the clock edge of its out_valid cycle, in
  // order of the inferences
  int exp_q [$];
  int n_edge_checked = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected out_valid");
    end else begin
      int e;
      e = exp_q.pop_front();
      n_edge_checked++;
      if (int'(crisp_out) != e) begin
        failures++; $display("FAIL at the clock edge: out=%0d expected %0d", crisp_out, e);
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

  task automatic cfg_write(int a, int v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 12'(a); cfg_wdata = data_t'(v);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic write_mf(int i, int m);
    int b;
    b = int'(CFG_MF_BASE) + (i * 4 + m) * 7;
    cfg_write(b + 0, mf[i][m].left);
    cfg_write(b + 1, mf[i][m].tleft);
    cfg_write(b + 2, mf[i][m].tright);
    cfg_write(b + 3, mf[i][m].right);
    cfg_write(b + 4, mf[i][m].height);
    cfg_write(b + 5, mf[i][m].sl);
    cfg_write(b + 6, mf[i][m].sr);
  endtask

  task automatic host_write(int a, int v);
    @(negedge clk); host_en = 1; host_we = 1; host_addr = 11'(a); host_wdata = data_t'(v);
    @(negedge clk); host_en = 0; host_we = 0;
  endtask

  task automatic host_read(int a, output int v);
    @(negedge clk); host_en = 1; host_we = 0; host_addr = 11'(a);
    @(negedge clk); host_en = 0; v = int'(host_rdata);
  endtask

  task automatic set_mode(int md);
    if (int'(mode) != md) n_switch++;
    cfg_write(int'(CFG_MODE_ADDR), md);
  endtask

  // nullified active rules of this input vector (combinational rule base)
  function automatic int count_null(int x[4]);
    int k[4], c;
    c = 0;
    for (int i = 0; i < 4; i++) k[i] = ref_pair(x[i], mf[i]);
    for (int r = 0; r < 16; r++) begin
      int a;
      a = 0;
      for (int i = 0; i < 4; i++) a += (k[i] + ((r >> i) & 1)) << (2 * i);
      if (comb_tab[a] >= 5) c++;
    end
    return c;
  endfunction

  // One inference; if b2b, start is raised without an idle cycle before it
  // (the caller is in the out_valid cycle of the previous one).
  task automatic infer(int x[4], int md, bit b2b);
    int exp, lat, guard;
    guard = 0;
    if (!b2b) while (!ready && guard < 100) begin @(negedge clk); guard++; end
    else begin
      n_b2b++;
      // a new start is taken in the valid cycle, except after an FLC4
      // inference when the next one uses the combinational rule base
      checks++;
      if (!ready && !(last_md == 3 && md < 2)) begin
        failures++;
        $display("FAIL FLC%0d start refused in the valid cycle of FLC%0d", md + 1, last_md + 1);
      end
    end
    for (int i = 0; i < 4; i++) crisp_in[i] = data_t'(x[i]);
    exp = ref_infer(x, mf, comb_tab, centres, bram, md);
    exp_q.push_back(exp);
    if (md < 2 && count_null(x) > 0) n_null++;
    start = 1;
    while (!ready) begin n_blocked++; @(negedge clk); end
    @(negedge clk);
    start = 0;
    for (int i = 0; i < 4; i++) crisp_in[i] = data_t'($urandom);   // must not matter
    lat = 1;
    while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != LAT[md]) begin
      failures++;
      $display("FAIL FLC%0d latency %0d, expected %0d", md + 1, lat, LAT[md]);
    end
    checks++;
    if (int'(crisp_out) != exp || int'(op_mode) != md) begin
      failures++;
      $display("FAIL FLC%0d x=%p out=%0d expected %0d (op_mode %0d)", md + 1, x, crisp_out, exp, op_mode);
    end
    n_mode[md]++;
    last_md = md;
  endtask

  task automatic run_mode(int md, int n);
    int x[4];
    set_mode(md);
    for (int t = 0; t < n; t++) begin
      for (int i = 0; i < 4; i++) x[i] = $urandom_range(0, 255);
      infer(x, md, (t % 3 == 2));
      if (t % 3 != 1) begin
        // check that the output holds after the valid cycle
        data_t held;
        held = crisp_out;
        @(negedge clk);
        checks++; n_hold++;
        if (crisp_out != held) begin failures++; $display("FAIL output not held"); end
      end
    end
    // let the last one settle
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int x[4];
    for (int i = 0; i < N_IN; i++) crisp_in[i] = '0;
    cfg_addr = '0; cfg_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // -------- load the configuration
    for (int i = 0; i < 4; i++) begin
      ref_mf_t s[4];
      gen_mfs(s);
      mf[i] = s;
      for (int m = 0; m < 4; m++) write_mf(i, m);
    end
    for (int m = 0; m < 5; m++) begin
      centres[m] = 25 + 50 * m + $urandom_range(0, 10);
      cfg_write(int'(CFG_OMF_BASE) + m, centres[m]);
    end
    for (int a = 0; a < 256; a++) begin
      comb_tab[a] = ($urandom_range(0, 19) == 0) ? 7 : $urandom_range(0, 4);
      cfg_write(int'(CFG_COMB_BASE) + a, comb_tab[a]);
      bram[a] = $urandom_range(0, 255);
      cfg_write(int'(CFG_BRAM_BASE) + a, bram[a]);
    end

    // -------- every implementation, then switch back and forth
    for (int md = 0; md < 4; md++) run_mode(md, N_PER_MODE);
    run_mode(1, 20);
    run_mode(2, 20);
    run_mode(0, 20);

    // -------- mode changed while an inference runs, next one started in
    // its out_valid cycle (FLC4 then FLC1/FLC2 must wait one cycle)
    for (int t = 0; t < 8; t++) begin
      int md2;
      md2 = (t % 2 == 0) ? 1 : 0;
      set_mode((t < 4) ? 3 : 2);
      for (int i = 0; i < 4; i++) x[i] = $urandom_range(0, 255);
      fork
        infer(x, (t < 4) ? 3 : 2, 0);
        begin
          repeat (3) @(negedge clk);
          cfg_write(int'(CFG_MODE_ADDR), md2);
          n_busy_switch++; n_switch++;
        end
      join
      for (int i = 0; i < 4; i++) x[i] = $urandom_range(0, 255);
      infer(x, md2, 1);
      repeat (2) @(negedge clk);
    end

    // -------- difference-based changes between inferences
    // a rule of the block-RAM rule base
    set_mode(3);
    x = '{100, 100, 100, 100};
    infer(x, 3, 0);
    begin
      int a;
      a = 0;
      for (int i = 0; i < 4; i++) a += ref_pair(x[i], mf[i]) << (2 * i);
      bram[a] = (bram[a] + 77) % 256;
      cfg_write(int'(CFG_BRAM_BASE) + a, bram[a]);
      n_rule_change++;
    end
    infer(x, 3, 0);
    // a membership function: input 0, function 0 moved off zero, then x=0
    // lies in a gap and every rule weight is zero
    mf[0][0].left  = 10;
    if (mf[0][0].tleft < 10) mf[0][0].tleft = 10;
    if (mf[0][0].tright < 10) mf[0][0].tright = 10;
    write_mf(0, 0);
    n_mf_change++;
    for (int md = 0; md < 4; md++) begin
      set_mode(md);
      x = '{0, $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255)};
      if (md == 0 || md == 2) n_zero++;
      infer(x, md, 0);
      checks++;
      if ((md == 0 || md == 2) && crisp_out != 0) begin
        failures++; $display("FAIL zero-weight COG output %0d", crisp_out);
      end
    end

    // -------- configuration switch through the SystemACE MPU port
    begin
      int nw, cyc;
      logic [15:0] last;
      nw = 0;
      @(negedge clk);
      reconfig_sel = 3'd5; reconfig_req = 1;
      @(negedge clk); reconfig_req = 0;
      cyc = 0;
      while (!reconfig_done && cyc < 100) begin
        @(negedge clk); cyc++;
        if (!mpu_wen_n) last = mpu_data;
        if (!mpu_wen_n && !mpu_cen_n) nw++;
      end
      checks++;
      if (!reconfig_done || last != 16'hA004 || mpu_addr != 7'h00) begin
        failures++; $display("FAIL reconfiguration sequence, last word %h", last);
      end else n_reconfig++;
    end

    // -------- processor path through the shared memory
    host_attach = 1;
    for (int md = 0; md < 4; md++) begin
      set_mode(md);
      for (int t = 0; t < 10; t++) begin
        int exp, st, res, guard;
        for (int i = 0; i < 4; i++) begin
          x[i] = $urandom_range(0, 255);
          host_write(1 + i, x[i]);
        end
        exp = ref_infer(x, mf, comb_tab, centres, bram, md);
        exp_q.push_back(exp);
        host_write(0, 1);
        guard = 0;
        do begin host_read(0, st); guard++; end while (st != 2 && guard < 200);
        host_read(5, res);
        checks += 3;
        if (st != 2) begin failures++; $display("FAIL host: no status"); end
        if (res != exp) begin failures++; $display("FAIL host FLC%0d: %0d expected %0d", md + 1, res, exp); end
        if (ready) begin failures++; $display("FAIL pin ready while attached"); end
        n_host++;
      end
    end
    host_attach = 0;

    // -------- every mechanism happened
    repeat (2) @(negedge clk);
    for (int md = 0; md < 4; md++) begin
      checks++;
      if (n_mode[md] == 0) begin failures++; $display("FAIL FLC%0d never ran", md + 1); end
    end
    checks += 9;
    if (n_host == 0)        begin failures++; $display("FAIL processor path never used"); end
    checks += 3;
    if (exp_q.size() != 0 || n_edge_checked == 0) begin failures++; $display("FAIL results missing at the clock edge"); end
    if (n_blocked == 0)     begin failures++; $display("FAIL no start held off by ready"); end
    if (n_busy_switch == 0) begin failures++; $display("FAIL no mode change during an inference"); end
    if (n_switch == 0)      begin failures++; $display("FAIL no mode switch"); end
    if (n_b2b == 0)         begin failures++; $display("FAIL no back-to-back inference"); end
    if (n_null == 0)        begin failures++; $display("FAIL no nullified rule"); end
    if (n_zero == 0)        begin failures++; $display("FAIL no zero-weight case"); end
    if (n_mf_change == 0)   begin failures++; $display("FAIL no membership change"); end
    if (n_rule_change == 0) begin failures++; $display("FAIL no rule change"); end
    if (n_hold == 0)        begin failures++; $display("FAIL no output hold check"); end
    if (n_reconfig == 0)    begin failures++; $display("FAIL no reconfiguration"); end
    $display("inferences FLC1..4: %0d %0d %0d %0d; mode switches %0d (%0d during an inference), back-to-back %0d, held-off start cycles %0d,",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_busy_switch, n_b2b, n_blocked);
    $display("with nullified rules %0d, zero weight %0d, mf changes %0d, rule changes %0d, reconfigurations %0d, processor inferences %0d",
             n_null, n_zero, n_mf_change, n_rule_change, n_reconfig, n_host);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
