// tb_fom_defuzz: random centres and degrees (with deliberate ties and all-zero
// cases); checks that the output is the centre of the first rule with the
// largest degree.
module tb_fom_defuzz;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  data_t y [N_ACTIVE];
  data_t w [N_ACTIVE];
  data_t out;

  fom_defuzz dut (.y, .w, .out);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int mx, first;
      for (int r = 0; r < N_ACTIVE; r++) begin
        y[r] = data_t'($urandom_range(0, 255));
        case (t % 3)
          0: w[r] = data_t'($urandom_range(0, 255));
          1: w[r] = data_t'($urandom_range(0, 3) * 60);   // many ties
          default: w[r] = (t % 30 == 2) ? '0 : data_t'($urandom_range(0, 1) * 200);
        endcase
      end
      #1;
      mx = -1; first = 0;
      for (int r = N_ACTIVE - 1; r >= 0; r--)
        if (int'(w[r]) >= mx) begin mx = int'(w[r]); first = r; end
      checks++;
      if (out != y[first]) begin
        failures++;
        $display("FAIL out=%0d expected y[%0d]=%0d", out, first, y[first]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
