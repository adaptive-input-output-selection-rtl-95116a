// tb_congestion_detector: drives an occupancy sequence through the
// congestion detector (8 slots, threshold 6) and checks, cycle by cycle,
// W_Full = occupancy >= 6 and CF = W_Full and occupancy grew since the
// previous clock edge.
module tb_congestion_detector;
  logic clk = 0, rst_n = 0;
  logic [3:0] n_new;
  logic w_full, cf;
  int checks = 0, failures = 0;
  congestion_detector #(.DEPTH(8), .THRESH(6)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int seq[$] = '{0, 2, 4, 5, 6, 7, 7, 8, 8, 7, 6, 7, 5, 6, 6, 3, 8, 0};
    int prev = 0;
    n_new = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (seq[i]) begin
      @(negedge clk);
      n_new = 4'(seq[i]);
      #1; checks += 2;
      if (w_full != (seq[i] >= 6)) begin failures++; $display("FAIL w_full at %0d", i); end
      if (cf != (seq[i] >= 6 && seq[i] > prev)) begin failures++; $display("FAIL cf at %0d", i); end
      prev = seq[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
