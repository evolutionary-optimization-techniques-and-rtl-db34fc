// tb_rule_strength: random member indices and degrees; checks the 16 rule
// addresses and Min degrees against an independent enumeration.
module tb_rule_strength;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  mf_idx_t    idx [N_IN][OVERLAP];
  data_t      deg [N_IN][OVERLAP];
  rule_addr_t addr [N_ACTIVE];
  data_t      strength [N_ACTIVE];

  rule_strength dut (.idx, .deg, .addr, .strength);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k[N_IN];
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N_IN; i++) begin
        k[i] = $urandom_range(0, 2);
        idx[i][0] = mf_idx_t'(k[i]);
        idx[i][1] = mf_idx_t'(k[i] + 1);
        deg[i][0] = data_t'($urandom_range(0, 255));
        deg[i][1] = data_t'((t % 7 == 0) ? 0 : $urandom_range(0, 255));
      end
      #1;
      for (int r = 0; r < N_ACTIVE; r++) begin
        int a, s;
        a = 0; s = 255;
        for (int i = 0; i < N_IN; i++) begin
          int b;
          b = (r >> i) & 1;
          a = a + ((k[i] + b) * (4 ** i));
          s = (int'(deg[i][b]) < s) ? int'(deg[i][b]) : s;
        end
        checks++;
        if (int'(addr[r]) != a || int'(strength[r]) != s) begin
          failures++;
          $display("FAIL rule %0d: addr=%0d strength=%0d expected %0d %0d", r, addr[r], strength[r], a, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
