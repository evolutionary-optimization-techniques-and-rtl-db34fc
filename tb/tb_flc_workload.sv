// tb_flc_workload: the evaluated configuration run as a stream of inferences.
//
// The controller is loaded the way the resource and speed figures of the
// original design were taken: four inputs, each with four triangular
// membership functions, and five output membership functions. The input
// triangles are evenly spaced with peaks at 0, 85, 170 and 255 and full height,
// so neighbours cross at half height. The output centres are 0, 64, 128, 191
// and 255. Rule (a,b,c,d) names the output member round((a+b+c+d)/3), a
// smooth control surface. The block-RAM rule base holds the same centres as
// the combinational one, so FLC1 and FLC3 (centre of gravity) must agree on
// every input, and so must FLC2 and FLC4 (first of maxima).
//
// The same input vectors go through all four implementations with start held
// high, so every inference is taken in the out_valid cycle of the one before.
// For each mode the testbench checks:
//   - every output against the reference model;
//   - the latency of every inference (16 / 1 / 32 / 16 clocks);
//   - the spacing of the results: one result every T_total clocks.
// It prints the inferences per clock and the rate in inferences per second
// that would follow at the clock rates listed for the original
// implementations (30.20, 92.20, 49.42 and 145.22 MHz). Input vectors that
// sit on membership peaks fire a single rule, and their output must be that
// rule's centre exactly in all four modes.
module tb_flc_workload;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  localparam int N_VEC = 96;
  localparam int N_PEAK = 16;
  localparam int LAT [4] = '{16, 1, 32, 16};
  localparam int FREQ_KHZ [4] = '{30200, 92200, 49420, 145220};

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

  ref_mf_t mf [4][4];
  int comb_tab [256];
  int centres [5] = '{0, 64, 128, 191, 255};
  int bram [256];
  int peak [4] = '{0, 85, 170, 255};

  int vec [N_VEC][4];
  int res [4][N_VEC];

  // cycle counter and the cycles at which results appear
  int cyc = 0;
  int out_cyc [$];
  int out_val [$];
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      out_cyc.push_back(cyc);
      out_val.push_back(int'(crisp_out));
    end
    cyc <= cyc + 1;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Stream all vectors through one mode; returns the cycle each was taken in.
  task automatic stream(int md, output int acc_cyc [N_VEC]);
    cfg_write(int'(CFG_MODE_ADDR), md);
    repeat (2) @(negedge clk);
    out_cyc.delete();
    out_val.delete();
    for (int v = 0; v < N_VEC; v++) begin
      for (int i = 0; i < 4; i++) crisp_in[i] = data_t'(vec[v][i]);
      start = 1;
      while (!ready) @(negedge clk);
      acc_cyc[v] = cyc;
      @(negedge clk);
    end
    start = 0;
    repeat (LAT[md] + 3) @(negedge clk);
  endtask

  initial begin
    int acc [N_VEC];
    for (int i = 0; i < N_IN; i++) crisp_in[i] = '0;
    cfg_addr = '0; cfg_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // -------- membership functions: evenly spaced full-height triangles
    for (int i = 0; i < 4; i++)
      for (int m = 0; m < 4; m++) begin
        int b;
        mf[i][m].tleft  = peak[m];
        mf[i][m].tright = peak[m];
        mf[i][m].left   = (m == 0) ? 0   : peak[m] - 85;
        mf[i][m].right  = (m == 3) ? 255 : peak[m] + 85;
        mf[i][m].height = 255;
        mf[i][m].sl     = 48;    // 255 over 85 steps, Q4.4
        mf[i][m].sr     = 48;
        b = int'(CFG_MF_BASE) + (i * 4 + m) * 7;
        cfg_write(b + 0, mf[i][m].left);
        cfg_write(b + 1, mf[i][m].tleft);
        cfg_write(b + 2, mf[i][m].tright);
        cfg_write(b + 3, mf[i][m].right);
        cfg_write(b + 4, mf[i][m].height);
        cfg_write(b + 5, mf[i][m].sl);
        cfg_write(b + 6, mf[i][m].sr);
      end

    // -------- output centres and the two rule bases
    for (int m = 0; m < 5; m++) cfg_write(int'(CFG_OMF_BASE) + m, centres[m]);
    for (int a = 0; a < 256; a++) begin
      int s;
      s = (a & 3) + ((a >> 2) & 3) + ((a >> 4) & 3) + ((a >> 6) & 3);
      comb_tab[a] = (s * 4 + 6) / 12;
      bram[a] = centres[comb_tab[a]];
      cfg_write(int'(CFG_COMB_BASE) + a, comb_tab[a]);
      cfg_write(int'(CFG_BRAM_BASE) + a, bram[a]);
    end

    // -------- input vectors: some on membership peaks, the rest random
    for (int v = 0; v < N_VEC; v++)
      for (int i = 0; i < 4; i++)
        vec[v][i] = (v < N_PEAK) ? peak[$urandom_range(0, 3)] : $urandom_range(0, 255);

    // -------- one stream per implementation
    for (int md = 0; md < 4; md++) begin
      int span;
      stream(md, acc);
      checks++;
      if (out_val.size() != N_VEC) begin
        failures++;
        $display("FAIL FLC%0d: %0d results for %0d inferences", md + 1, out_val.size(), N_VEC);
        continue;
      end
      for (int v = 0; v < N_VEC; v++) begin
        int e;
        res[md][v] = out_val[v];
        e = ref_infer(vec[v], mf, comb_tab, centres, bram, md);
        checks++;
        if (out_val[v] != e) begin
          failures++;
          $display("FAIL FLC%0d x=%p out=%0d expected %0d", md + 1, vec[v], out_val[v], e);
        end
        checks++;
        if (out_cyc[v] - acc[v] != LAT[md]) begin
          failures++;
          $display("FAIL FLC%0d latency %0d, expected %0d", md + 1, out_cyc[v] - acc[v], LAT[md]);
        end
        if (v > 0) begin
          checks++;
          if (out_cyc[v] - out_cyc[v-1] != LAT[md]) begin
            failures++;
            $display("FAIL FLC%0d results %0d clocks apart, expected %0d",
                     md + 1, out_cyc[v] - out_cyc[v-1], LAT[md]);
          end
        end
        if (v < N_PEAK) begin
          int a;
          a = 0;
          for (int i = 0; i < 4; i++) a += (vec[v][i] / 85) << (2 * i);
          checks++;
          if (out_val[v] != centres[comb_tab[a]]) begin
            failures++;
            $display("FAIL FLC%0d peak input %p gave %0d, rule centre %0d",
                     md + 1, vec[v], out_val[v], centres[comb_tab[a]]);
          end
        end
      end
      span = out_cyc[N_VEC-1] - acc[0];
      $display("FLC%0d: %0d inferences in %0d clocks, T_total %0d; at %0d.%02d MHz: %0d.%02d M inferences/s",
               md + 1, N_VEC, span, span / N_VEC,
               FREQ_KHZ[md] / 1000, (FREQ_KHZ[md] % 1000) / 10,
               FREQ_KHZ[md] / LAT[md] / 1000, (FREQ_KHZ[md] / LAT[md] % 1000) / 10);
      checks++;
      if (span != N_VEC * LAT[md]) begin
        failures++;
        $display("FAIL FLC%0d stream took %0d clocks, expected %0d", md + 1, span, N_VEC * LAT[md]);
      end
    end

    // -------- the two rule bases agree
    for (int v = 0; v < N_VEC; v++) begin
      checks += 2;
      if (res[0][v] != res[2][v]) begin
        failures++; $display("FAIL FLC1 %0d and FLC3 %0d differ", res[0][v], res[2][v]);
      end
      if (res[1][v] != res[3][v]) begin
        failures++; $display("FAIL FLC2 %0d and FLC4 %0d differ", res[1][v], res[3][v]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
