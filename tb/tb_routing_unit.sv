// tb_routing_unit: for every node pair of an 8 x 8 mesh and every pattern
// of neighbour congestion flags, checks the selected output against the
// selection rule (first uncongested of MinPath1, MinPath2, NonminPath,
// else MinPath1) applied to the reference candidates of
// tb_route_model.svh.
module tb_routing_unit;
  import aios_pkg::*;
  `include "tb_route_model.svh"
  addr_t cur, dst;
  logic [3:0] nbr_cf;
  dir_e sel;
  logic min2_taken, nonmin_taken;
  int checks = 0, failures = 0;
  routing_unit #(.COLS(8)) dut (.*);
  initial begin : watchdog
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [4:0] mm;
    int nm, m1, m2, exp;
    for (int k = 0; k < 64; k++)
      for (int d = 0; d < 64; d++) begin
        m_candidates(k % 8, k / 8, d % 8, d / 8, 8, mm, nm);
        // order: horizontal first
        m1 = -1; m2 = -1;
        for (int i = 4; i >= 0; i--) if (mm[i]) begin
          if (m1 < 0) m1 = i; else m2 = i;
        end
        for (int c = 0; c < 16; c++) begin
          cur = '{y: 3'(k / 8), x: 3'(k % 8)};
          dst = '{y: 3'(d / 8), x: 3'(d % 8)};
          nbr_cf = 4'(c);
          #1;
          if (m1 == 4 || !c[m1]) exp = m1;
          else if (m2 >= 0 && !c[m2]) exp = m2;
          else if (nm >= 0 && !c[nm]) exp = nm;
          else exp = m1;
          checks++;
          if (int'(sel) != exp || nonmin_taken != (exp == nm && exp != m1)
              || min2_taken != (m2 >= 0 && exp == m2 && exp != m1)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d->%0d cf=%b sel=%0d exp=%0d", k, d, c, sel, exp);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
