// tb_fuzzifier: random ordered membership-function sets and random inputs;
// checks the two selected member indices and their degrees against the
// reference model, including inputs in gaps between functions.
module tb_fuzzifier;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t     x;
  mf_param_t mf  [N_MF];
  mf_idx_t   idx [OVERLAP];
  data_t     deg [OVERLAP];

  fuzzifier dut (.x, .mf, .idx, .deg);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_mf_t r[4];
    int k, d0, d1;
    for (int t = 0; t < 3000; t++) begin
      gen_mfs(r);
      for (int m = 0; m < 4; m++)
        mf[m] = '{data_t'(r[m].left), data_t'(r[m].tleft), data_t'(r[m].tright),
                  data_t'(r[m].right), data_t'(r[m].height), data_t'(r[m].sl), data_t'(r[m].sr)};
      x = data_t'($urandom_range(0, 255));
      #1;
      k  = ref_pair(int'(x), r);
      d0 = ref_degree(int'(x), r[k]);
      d1 = ref_degree(int'(x), r[k+1]);
      checks++;
      if (int'(idx[0]) != k || int'(idx[1]) != k + 1 || int'(deg[0]) != d0 || int'(deg[1]) != d1) begin
        failures++;
        $display("FAIL x=%0d idx=%0d,%0d deg=%0d,%0d expected %0d,%0d deg %0d,%0d",
                 x, idx[0], idx[1], deg[0], deg[1], k, k + 1, d0, d1);
      end
      // every function that is not selected has zero degree
      for (int m = 0; m < 4; m++)
        if (m != k && m != k + 1) begin
          checks++;
          if (ref_degree(int'(x), r[m]) != 0) begin
            failures++;
            $display("FAIL x=%0d: unselected function %0d is active", x, m);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
