// tb_wrr_arbiter: checks the weighted round-robin arbiter.
//  1. All five inputs request without pause, weights 3, 0, 4, 2, 1: the
//     grants must run 0 0 0 1 2 2 2 2 3 3 4 and repeat (an input is served
//     max(weight, 1) packets per turn, then the turn passes on).
//  2. Random requests and weights (0..4): a model that tracks the turn
//     owner and its packets left predicts every grant; any input that
//     requests without pause must be served within 16 other grants.
//  3. arb_en low: no grant, state kept.
module tb_wrr_arbiter;
  import aios_pkg::*;
  logic clk = 0, rst_n = 0;
  logic arb_en;
  logic [4:0] req, gnt;
  logic [CL_W-1:0] weight [5];
  logic any_gnt, hold;
  int checks = 0, failures = 0;
  wrr_arbiter #(.N(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model state
  int m_ptr = 0, m_left = 0, m_turn = -1;
  int wait_cnt [5];

  function automatic int model_grant(logic [4:0] r);
    for (int k = 0; k < 5; k++) if (r[(m_ptr + k) % 5]) return (m_ptr + k) % 5;
    return -1;
  endfunction

  task automatic model_update(int g, int w);
    int left;
    left = (m_turn == g && m_left > 0) ? m_left : (w == 0 ? 1 : w);
    left--;
    m_turn = g;
    m_left = left;
    m_ptr = (left == 0) ? (g + 1) % 5 : g;
  endtask

  initial begin
    int exp_seq[$] = '{0, 0, 0, 1, 2, 2, 2, 2, 3, 3, 4};
    arb_en = 0; req = 0;
    foreach (weight[i]) weight[i] = 0;
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. fixed pattern
    weight[0] = 3; weight[1] = 0; weight[2] = 4; weight[3] = 2; weight[4] = 1;
    for (int t = 0; t < 33; t++) begin
      @(negedge clk);
      req = '1; arb_en = 1;
      #1; checks++;
      if (gnt != 5'(1 << exp_seq[t % 11])) begin
        failures++; $display("FAIL fixed t=%0d gnt=%b exp %0d", t, gnt, exp_seq[t % 11]);
      end
      @(posedge clk);
      model_update(exp_seq[t % 11], weight[exp_seq[t % 11]]);
    end
    // 3. arb_en low
    @(negedge clk); arb_en = 0; #1; checks++;
    if (gnt != 0 || any_gnt) failures++;
    @(posedge clk);
    // 2. random
    for (int t = 0; t < 3000; t++) begin
      int g;
      @(negedge clk);
      if (t % 50 == 0) foreach (weight[i]) weight[i] = CL_W'($urandom_range(4));
      // inputs 0 and 3 request all the time, the others at random
      req = 5'($urandom) | 5'b01001;
      arb_en = ($urandom_range(3) != 0);
      #1;
      g = arb_en ? model_grant(req) : -1;
      checks++;
      if ((g < 0 && gnt != 0) || (g >= 0 && gnt != 5'(1 << g))) begin
        failures++;
        if (failures < 10) $display("FAIL random t=%0d req=%b gnt=%b exp %0d", t, req, gnt, g);
      end
      @(posedge clk);
      if (g >= 0) begin
        model_update(g, weight[g]);
        for (int i = 0; i < 5; i++)
          if (i == g) wait_cnt[i] = 0;
          else if (i == 0 || i == 3) wait_cnt[i]++;
        checks++;
        if (wait_cnt[0] > 16 || wait_cnt[3] > 16) begin
          failures++; $display("FAIL starvation t=%0d", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
