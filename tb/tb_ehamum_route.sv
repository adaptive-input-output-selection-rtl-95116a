// tb_ehamum_route: exhaustive check of the Enhanced HAMUM routing function
// on an 8 x 8 mesh. For every current node and destination the candidate
// set {min1, min2} and the non-minimal candidate are compared with a
// reference model derived from the label-monotone path rules
// (tb_route_model.svh). When two minimal candidates exist, min1 must be the
// horizontal one.
module tb_ehamum_route;
  import aios_pkg::*;
  `include "tb_route_model.svh"

  localparam int COLS = 8;
  addr_t cur, dst;
  path_t min1, min2, nonmin;
  int checks = 0, failures = 0;

  ehamum_route #(.COLS(COLS)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp_min, got_min;
    int exp_non, got_non;
    for (int k = 0; k < 64; k++)
      for (int d = 0; d < 64; d++) begin
        cur = '{y: 3'(k / 8), x: 3'(k % 8)};
        dst = '{y: 3'(d / 8), x: 3'(d % 8)};
        #1;
        m_candidates(k % 8, k / 8, d % 8, d / 8, COLS, exp_min, exp_non);
        got_min = '0;
        if (min1.valid) got_min[min1.dir] = 1'b1;
        if (min2.valid) got_min[min2.dir] = 1'b1;
        got_non = nonmin.valid ? int'(nonmin.dir) : -1;
        checks++;
        if (got_min != exp_min || got_non != exp_non || !min1.valid
            || (min2.valid && min1.dir[1] != 1'b1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL cur (%0d,%0d) dst (%0d,%0d): min %b/%b non %0d/%0d",
                     k % 8, k / 8, d % 8, d / 8, got_min, exp_min, got_non, exp_non);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
