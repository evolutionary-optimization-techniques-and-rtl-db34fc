// tb_mf_eval: checks the degree of one membership function against the
// reference model for random trapezoids and triangles and random inputs, plus
// the defining points (zero at the base ends, full height on the top).
module tb_mf_eval;
  import flc_pkg::*;
  import flc_ref_pkg::*;

  int checks = 0, failures = 0;
  data_t     x, degree;
  mf_param_t p;

  mf_eval dut (.x, .p, .degree);

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (int'(degree) != exp) begin
      failures++;
      $display("FAIL %s: x=%0d %p degree=%0d expected %0d", what, x, p, degree, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_mf_t mf[4], r;
    // fixed triangle: base 40..120, peak 80, height 200, slope 200/40 = 5.0
    p = '{left:40, tleft:80, tright:80, right:120, height:200, slope_l:80, slope_r:80};
    r = '{40, 80, 80, 120, 200, 80, 80};
    x = 39;  check(0,   "below base");
    x = 40;  check(0,   "left end");
    x = 60;  check(100, "half rising");
    x = 80;  check(200, "peak");
    x = 100; check(100, "half falling");
    x = 120; check(0,   "right end");
    x = 121; check(0,   "above base");
    for (int t = 0; t < 3000; t++) begin
      gen_mfs(mf);
      r = mf[$urandom_range(0, 3)];
      p.left = data_t'(r.left); p.tleft = data_t'(r.tleft); p.tright = data_t'(r.tright);
      p.right = data_t'(r.right); p.height = data_t'(r.height);
      p.slope_l = data_t'(r.sl); p.slope_r = data_t'(r.sr);
      x = data_t'($urandom_range(0, 255));
      check(ref_degree(int'(x), r), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
