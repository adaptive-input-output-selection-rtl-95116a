// tb_switch_allocator: inputs raise random output requests, hold each
// granted packet for a random number of cycles, then release. Checks that
// an output never has two owners, that ownership reaches only inputs that
// requested it, that a released output is regranted when requested, and
// that every request is eventually served (no lost grants) and that a
// held output stays with its owner until the owner releases it.
module tb_switch_allocator;
  import aios_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NUM_OUT-1:0] req_mask [NUM_IN];
  logic release_i [NUM_IN];
  logic [CL_W-1:0] weight [NUM_IN];
  logic [NUM_OUT-1:0] own_mask [NUM_IN];
  logic [NUM_OUT-1:0] busy, multi_serve;
  logic [2:0] owner [NUM_OUT];
  int checks = 0, failures = 0;
  int hold_left [NUM_IN];
  int waiting [NUM_IN];
  int served = 0, n_multi = 0;
  logic held [NUM_IN];
  switch_allocator dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (30000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < NUM_IN; i++) begin
      req_mask[i] = '0; release_i[i] = 0; held[i] = 0; weight[i] = CL_W'(i % 5); hold_left[i] = 0; waiting[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_IN; i++) begin
        release_i[i] = 0;
        if (req_mask[i] == '0) begin
          if ($urandom_range(3) == 0) begin
            req_mask[i] = '0;
            req_mask[i][$urandom_range(NUM_OUT - 1)] = 1'b1;
            hold_left[i] = 1 + int'($urandom_range(6));
            waiting[i] = 0;
          end
        end else if ((own_mask[i] & req_mask[i]) == req_mask[i]) begin
          held[i] = 1;
          if (--hold_left[i] == 0) begin release_i[i] = 1; served++; end
        end else begin
          checks++;
          if (held[i]) begin failures++; $display("FAIL input %0d lost its output mid-packet", i); end
          waiting[i]++;
          checks++;
          if (waiting[i] > 400) begin failures++; $display("FAIL input %0d starved", i); waiting[i] = 0; end
        end
      end
      #1;
      for (int o = 0; o < NUM_OUT; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < NUM_IN; i++) if (own_mask[i][o]) begin
          n++;
          if (!req_mask[i][o]) begin failures++; $display("FAIL unrequested ownership"); end
        end
        checks++;
        if (n > 1 || (n == 1) != busy[o]) begin failures++; $display("FAIL output %0d owners %0d busy %b owner %0d t=%0d", o, n, busy, owner[o], t); end
      end
      if (|multi_serve) n_multi++;
      @(posedge clk);
      for (int i = 0; i < NUM_IN; i++) if (release_i[i]) begin req_mask[i] = '0; held[i] = 0; end
    end
    checks++;
    if (served < 500 || n_multi == 0) begin failures++; $display("FAIL served %0d multi %0d", served, n_multi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
