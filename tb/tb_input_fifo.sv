// tb_input_fifo: random push/pop traffic against a queue model of the
// 8-entry input buffer, including double pops; checks head, next entry,
// count, full and empty every cycle and that it holds exactly 8 flits.
module tb_input_fifo;
  import aios_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, pop1, pop2;
  logic [31:0] din, dout0, dout1;
  logic [3:0] count;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  input_fifo #(.DEPTH(8), .W(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop1 = 0; pop2 = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || full != (q.size() == 8) || empty != (q.size() == 0)
          || (q.size() > 0 && dout0 != q[0]) || (q.size() > 1 && dout1 != q[1])) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d count %0d model %0d", t, count, q.size());
      end
      // phase-dependent fill bias
      push = !full && ($urandom_range(99) < ((t / 200) % 2 ? 80 : 30));
      din  = $urandom;
      pop2 = (q.size() >= 2) && ($urandom_range(5) == 0);
      pop1 = !pop2 && (q.size() >= 1) && ($urandom_range(99) < ((t / 200) % 2 ? 30 : 70));
      @(posedge clk);
      if (pop2) begin void'(q.pop_front()); void'(q.pop_front()); end
      else if (pop1) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
