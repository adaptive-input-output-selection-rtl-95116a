// tb_cars: exhaustive check of the congestion-level adder: every
// combination of the four congestion flags must give their count.
module tb_cars;
  import aios_pkg::*;
  logic [3:0] cf;
  logic [CL_W-1:0] cl;
  int checks = 0, failures = 0;
  cars dut (.*);
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      int n;
      n = 0;
      cf = 4'(v);
      for (int b = 0; b < 4; b++) if (v & (1 << b)) n++;
      #1; checks++;
      if (int'(cl) != n) begin failures++; $display("FAIL cf=%b cl=%0d", cf, cl); end
    end
    // example from the description: north and east congested -> 010
    cf = 4'b0011; #1; checks++;
    if (cl != 3'b010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
