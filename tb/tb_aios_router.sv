// tb_aios_router: a single router at node (3, 2) with the neighbours
// modelled by the testbench.
//  1. latency: a one-flit-header packet from the west input to (6, 2)
//     leaves on the East port; its first flit must appear two cycles after
//     it was accepted;
//  2. weighted input selection: the North, East, South and West inputs
//     each send four packets to (3, 0) (South port) at the same time, with
//     upstream congestion levels 2, 0, 1, 3. The packet order on the South
//     port must follow the weighted round-robin rule (an input keeps the
//     turn for max(CL, 1) packets);
//  3. multicast copy: a packet from the North input for (3, 2) then (0, 2)
//     must leave both on the low-subnetwork delivery port and on the West
//     port, with the reached destination stripped from the header;
//  4. congestion level: while the West input is blocked and filling, its
//     flag is raised and the router's CL becomes 1.
module tb_aios_router;
  import aios_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid [NUM_IN]; flit_t in_flit [NUM_IN]; logic in_ready [NUM_IN];
  logic out_valid [NUM_OUT]; flit_t out_flit [NUM_OUT]; logic out_ready [NUM_OUT];
  logic cf_out [NUM_IN]; logic [3:0] nbr_cf; logic [CL_W-1:0] cl_out; logic [CL_W-1:0] cl_in [4];
  logic ev_min2, ev_nonmin, ev_fork, ev_multi_serve;
  int checks = 0, failures = 0, cyc = 0;
  flit_t rx [NUM_OUT][$];
  int first_rx_cyc [NUM_OUT];
  int acc_cyc [NUM_IN];

  aios_router #(.X(3), .Y(2), .COLS(8), .DEPTH(8), .THRESH(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc++;
    for (int o = 0; o < NUM_OUT; o++)
      if (out_valid[o] && out_ready[o]) begin
        if (rx[o].size() == 0) first_rx_cyc[o] = cyc;
        rx[o].push_back(out_flit[o]);
      end
    for (int i = 0; i < NUM_IN; i++)
      if (in_valid[i] && in_ready[i]) acc_cyc[i] = cyc;
  end

  function automatic addr_t A(int x, int y); return '{y: 3'(y), x: 3'(x)}; endfunction

  task automatic offer(int port, flit_t pk[$]);
    foreach (pk[i]) begin
      in_valid[port] <= 1; in_flit[port] <= pk[i];
      @(posedge clk);
      while (!in_ready[port]) @(posedge clk);
    end
    in_valid[port] <= 0;
  endtask

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  int wts [4] = '{2, 0, 1, 3};

  task automatic offer_four(int port);
    flit_t q[$];
    for (int p = 0; p < 4; p++) begin
      q.push_back(make_head(0, 0, A(port, 7), 8'(p), A(3, 0)));
      q.push_back(make_data(1, 21'(p)));
    end
    offer(port, q);
  endtask

  initial begin
    flit_t pk[$];
    int exp_order[$], got_order[$];
    int left [4];
    int ptr, turn, tleft;
    turn = -1; tleft = 0;
    for (int i = 0; i < NUM_IN; i++) begin in_valid[i] = 0; in_flit[i] = '0; end
    for (int o = 0; o < NUM_OUT; o++) begin out_ready[o] = 1; first_rx_cyc[o] = 0; end
    for (int i = 0; i < 4; i++) cl_in[i] = CL_W'(wts[i]);
    nbr_cf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. latency
    pk = '{make_head(0, 0, A(2, 2), 8'd1, A(6, 2)), make_data(1, 21'd1)};
    offer(IN_W, pk);
    repeat (6) @(posedge clk);
    check(rx[DIR_E].size() == 2 && rx[DIR_E][0] == pk[0], "east port carries the packet");
    check(first_rx_cyc[DIR_E] - (acc_cyc[IN_W] - 1) == 2, "two-cycle router latency");
    $display("router latency %0d cycles", first_rx_cyc[DIR_E] - (acc_cyc[IN_W] - 1));

    // 2. weighted round robin on the South port
    rx[DIR_S].delete();
    fork
      for (int i = 0; i < 4; i++) begin
        automatic int ii = i;
        fork offer_four(ii); join_none
      end
    join
    repeat (80) @(posedge clk);
    // model: requesting inputs are those with packets left
    for (int i = 0; i < 4; i++) left[i] = 4;
    ptr = 0;
    for (int n = 0; n < 16; n++) begin
      int g;
      g = -1;
      for (int k = 0; k < 5; k++) if (g < 0 && ((ptr + k) % 5) < 4 && left[(ptr + k) % 5] > 0) g = (ptr + k) % 5;
      if (g != turn || tleft == 0) tleft = (wts[g] == 0) ? 1 : wts[g];
      turn = g;
      tleft--;
      left[g]--;
      exp_order.push_back(g);
      ptr = (tleft == 0) ? (g + 1) % 5 : g;
    end
    foreach (rx[DIR_S][i]) if (flit_bom(rx[DIR_S][i])) got_order.push_back(int'(rx[DIR_S][i][SA_LSB +: COORD_W]));
    check(got_order.size() == 16, "sixteen packets on the south port");
    check(got_order == exp_order, "weighted round-robin order");
    $write("order:"); foreach (got_order[i]) $write(" %0d", got_order[i]); $write("  expected:");
    foreach (exp_order[i]) $write(" %0d", exp_order[i]); $display("");

    // 3. multicast copy from the north input
    rx[DIR_W].delete(); rx[DIR_L2].delete();
    pk = '{make_head(0, 1, A(3, 5), 8'd9, A(3, 2)), make_dest(A(0, 2)),
           make_data(0, 21'd3), make_data(1, 21'd4)};
    offer(IN_N, pk);
    repeat (8) @(posedge clk);
    check(rx[DIR_L2].size() == 3 && rx[DIR_W].size() == 3, "copies on delivery port and west port");
    check(rx[DIR_W].size() == 3 && flit_da(rx[DIR_W][0]) == A(0, 2) && rx[DIR_W][2] == pk[3],
          "forwarded copy names the next destination");
    check(rx[DIR_L2].size() == 3 && rx[DIR_L2] == rx[DIR_W], "both copies identical");

    // 4. congestion level from a filling west buffer
    out_ready[DIR_E] = 0;
    pk.delete();
    pk.push_back(make_head(0, 0, A(2, 2), 8'd2, A(6, 2)));
    for (int i = 0; i < 8; i++) pk.push_back(make_data(i == 7, 21'(i)));
    fork
      offer(IN_W, pk);
      begin
        int seen = 0;
        repeat (12) begin @(negedge clk); if (cf_out[IN_W] && cl_out == 1) seen++; end
        check(seen > 0, "west congestion flag raises CL to 1");
      end
    join_any
    out_ready[DIR_E] = 1;
    repeat (20) @(posedge clk);
    check(cl_out == 0, "CL back to 0 after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
