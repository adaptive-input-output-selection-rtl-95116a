// tb_aios_noc: end-to-end test of the 8 x 8 AIOS mesh at its default
// parameters.
//
// Every processing element is modelled by a packet queue. Three phases run
// one after the other:
//   1. uniform traffic: each node sends unicast packets to random nodes and
//      multicast packets to random destination sets (all with higher or all
//      with lower labels than the source, listed in visiting order);
//   2. hotspot traffic: most nodes send to node (4, 4), whose delivery port
//      accepts a flit only every fourth cycle, so buffers fill up;
//   3. a drain with all delivery ports ready.
// Packets are 5 to 25 flits long. A scoreboard checks that every delivered
// packet goes to one of its destinations, on the delivery port of its
// subnetwork (high when the destination label exceeds the source label),
// exactly once, with the right length and payload, and that every
// destination was reached. It also counts how often each mechanism of the
// router happened: congestion level of 2 or more, adaptive choice of the
// second minimal path, choice of the non-minimal path, multicast copy at an
// intermediate destination, weighted service (a grant that keeps its
// priority because the weight exceeds one), back-pressure on a delivery port and use of both delivery
// ports. A mechanism that never happened counts as a failure.
module tb_aios_noc;
  import aios_pkg::*;

  localparam int COLS = 8;
  localparam int ROWS = 8;
  localparam int NN   = COLS * ROWS;
  localparam int PKTS_UNIFORM = 6;
  localparam int PKTS_HOT     = 5;
  localparam int HOT = 4 * COLS + 4;

  logic  clk = 0;
  logic  rst_n = 0;
  logic  inj_valid [NN];
  flit_t inj_flit  [NN];
  logic  inj_ready [NN];
  logic  ej_valid  [NN][2];
  flit_t ej_flit   [NN][2];
  logic  ej_ready  [NN][2];
  logic [CL_W-1:0] cl [NN];
  logic  lcf [NN];
  logic  ev_min2 [NN], ev_nonmin [NN], ev_fork [NN], ev_multi_serve [NN];

  aios_noc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // scoreboard
  logic [NN-1:0] exp_mask [NN][256];
  logic [NN-1:0] got_mask [NN][256];
  int            exp_len  [NN][256];
  int            mid_next [NN];
  int            pending;               // deliveries still expected
  flit_t         inj_q [NN][$];

  // receive state per node and port
  int  rx_len [NN][2];
  int  rx_idx [NN][2];
  int  rx_src [NN][2];
  int  rx_mid [NN][2];
  logic rx_ok [NN][2];

  // mechanism counters
  int n_cl2 = 0, n_min2 = 0, n_nonmin = 0, n_fork = 0, n_multi = 0;
  int n_lcf = 0;
  int n_bp = 0, n_port0 = 0, n_port1 = 0, n_delivered = 0;

  function automatic int label(int k);
    int x = k % COLS, y = k / COLS;
    return (y % 2 == 0) ? y * COLS + x : y * COLS + COLS - 1 - x;
  endfunction

  function automatic int node_of_label(int l);
    int y = l / COLS, r = l % COLS;
    return (y % 2 == 0) ? y * COLS + r : y * COLS + COLS - 1 - r;
  endfunction

  function automatic addr_t addr(int k);
    addr_t a;
    a.x = COORD_W'(k % COLS);
    a.y = COORD_W'(k / COLS);
    return a;
  endfunction

  // Payload word: flit index in the original packet above a tag of the
  // packet, so copies that lost header flits can still be checked.
  function automatic logic [EOH_BIT-1:0] payload(int src, int mid, int idx);
    logic [20:0] tag = 21'((src * 7919 + mid * 104729) ^ 32'h0A5A5A5);
    return {8'(idx), tag};
  endfunction

  // Builds a packet with the given destination labels (already ordered).
  task automatic send(int src, int dl[$], bit mcast);
    int mid = mid_next[src];
    int len = 5 + int'($urandom_range(20));
    int nhdr = dl.size();
    mid_next[src] = (mid + 1) % 256;
    if (len < nhdr + 1) len = nhdr + 1;
    exp_len[src][mid]  = len;
    exp_mask[src][mid] = '0;
    got_mask[src][mid] = '0;
    foreach (dl[i]) begin
      exp_mask[src][mid][node_of_label(dl[i])] = 1'b1;
      pending++;
    end
    inj_q[src].push_back(make_head(1'b0, mcast, addr(src), MID_W'(mid),
                                   addr(node_of_label(dl[0]))));
    for (int i = 1; i < nhdr; i++)
      inj_q[src].push_back(make_dest(addr(node_of_label(dl[i]))));
    for (int i = nhdr; i < len; i++)
      inj_q[src].push_back(make_data(i == len - 1, payload(src, mid, i)));
  endtask

  task automatic send_unicast(int src, int dst);
    int dl[$];
    dl.push_back(label(dst));
    send(src, dl, 1'b0);
  endtask

  // Multicast to up to ndest destinations, all in one subnetwork.
  task automatic send_multicast(int src, int ndest);
    int dl[$];
    int ls = label(src);
    bit high = (ls == 0) ? 1'b1 : (ls == NN - 1) ? 1'b0 : 1'($urandom_range(1));
    for (int l = 0; l < NN; l++) begin
      if (high && l > ls && $urandom_range(NN - 1 - ls) < ndest) dl.push_back(l);
      if (!high && l < ls && $urandom_range(ls) < ndest) dl.push_back(l);
    end
    if (dl.size() == 0) dl.push_back(high ? NN - 1 : 0);
    if (!high) dl.reverse();
    send(src, dl, 1'b1);
  endtask

  // injection
  always @(posedge clk) begin
    for (int k = 0; k < NN; k++) begin
      if (inj_valid[k] && inj_ready[k]) void'(inj_q[k].pop_front());
    end
    for (int k = 0; k < NN; k++) begin
      inj_valid[k] <= (inj_q[k].size() > 0) && rst_n;
      inj_flit[k]  <= (inj_q[k].size() > 0) ? inj_q[k][0] : '0;
    end
  end

  // Delivery side: the pop happens at this edge, so the queue head shown
  // after it must account for the flit just taken.
  always @(posedge clk) begin
    if (rst_n) for (int k = 0; k < NN; k++) begin
      for (int p = 0; p < 2; p++) begin
        if (ej_valid[k][p] && ej_ready[k][p]) receive(k, p, ej_flit[k][p]);
      end
    end
  end

  task automatic receive(int k, int p, flit_t f);
    if (flit_bom(f)) begin
      int src = int'(f[SA_LSB + COORD_W +: COORD_W]) * COLS + int'(f[SA_LSB +: COORD_W]);
      rx_src[k][p] = src;
      rx_mid[k][p] = int'(f[MID_LSB +: MID_W]);
      rx_len[k][p] = 1;
      rx_idx[k][p] = -1;
      rx_ok[k][p]  = 1'b1;
      checks++;
      if (!exp_mask[src][rx_mid[k][p]][k] || got_mask[src][rx_mid[k][p]][k]) begin
        failures++;
        $display("FAIL: node %0d got unexpected packet src %0d mid %0d", k, src, rx_mid[k][p]);
      end
      checks++;
      if ((label(src) < label(k)) != (p == 0)) begin
        failures++;
        $display("FAIL: node %0d packet from %0d on wrong delivery port %0d", k, src, p);
      end
      if (p == 0) n_port0++; else n_port1++;
    end else begin
      if (flit_eoh(f)) begin
        int idx = int'(f[EOH_BIT-1 -: 8]);
        if (f[20:0] != payload(rx_src[k][p], rx_mid[k][p], 0)[20:0]) rx_ok[k][p] = 1'b0;
        if (rx_idx[k][p] >= 0 && idx != rx_idx[k][p] + 1) rx_ok[k][p] = 1'b0;
        rx_idx[k][p] = idx;
      end
      rx_len[k][p]++;
    end
    if (flit_eom(f)) begin
      int src = rx_src[k][p], mid = rx_mid[k][p];
      checks++;
      // a copy made at an intermediate destination lost one header flit
      if (!rx_ok[k][p] || rx_len[k][p] > exp_len[src][mid]
          || rx_idx[k][p] != exp_len[src][mid] - 1) begin
        failures++;
        $display("FAIL: node %0d packet src %0d mid %0d bad payload/length %0d/%0d",
                 k, src, mid, rx_len[k][p], exp_len[src][mid]);
      end
      got_mask[src][mid][k] = 1'b1;
      pending--;
      n_delivered++;
    end
  endtask

  // mechanism monitors
  always @(posedge clk) begin
    cycle++;
    if (rst_n) for (int k = 0; k < NN; k++) begin
      if (cl[k] >= 2) n_cl2++;
      if (ev_min2[k]) n_min2++;
      if (ev_nonmin[k]) n_nonmin++;
      if (ev_fork[k]) n_fork++;
      if (ev_multi_serve[k]) n_multi++;
      if (lcf[k]) n_lcf++;
    end
    // a delivery port held by a packet while the consumer is not ready
    if (rst_n) for (int p = 0; p < 2; p++)
      if (dut.g_row[4].g_col[4].u_router.busy[4 + p] && !ej_ready[HOT][p]) n_bp++;
  end

  int phase = 0;
  always @(posedge clk) begin
    for (int k = 0; k < NN; k++) begin
      ej_ready[k][0] <= !(phase == 2 && k == HOT) || (cycle % 4 == 0);
      ej_ready[k][1] <= !(phase == 2 && k == HOT) || (cycle % 4 == 0);
    end
  end

  task automatic expect_count(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end else $display("  %-28s %0d", name, n);
  endtask

  task automatic wait_drain(int limit);
    int t = 0;
    while ((pending > 0) && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  initial begin
    for (int k = 0; k < NN; k++) begin
      inj_valid[k] = 0; inj_flit[k] = '0; mid_next[k] = 0;
      ej_ready[k][0] = 1; ej_ready[k][1] = 1;
      for (int p = 0; p < 2; p++) begin rx_len[k][p] = 0; rx_src[k][p] = 0; rx_mid[k][p] = 0; rx_ok[k][p] = 0; end
      for (int m = 0; m < 256; m++) begin exp_mask[k][m] = '0; got_mask[k][m] = '0; exp_len[k][m] = 0; end
    end
    pending = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: uniform unicast (80 %) and multicast (20 %, 10 destinations)
    phase = 1;
    for (int r = 0; r < PKTS_UNIFORM; r++)
      for (int k = 0; k < NN; k++) begin
        if ($urandom_range(4) == 0) send_multicast(k, 10);
        else begin
          int d;
          do d = int'($urandom_range(NN - 1)); while (d == k);
          send_unicast(k, d);
        end
      end
    wait_drain(60000);
    $display("phase 1 done at cycle %0d, %0d deliveries pending", cycle, pending);
    // phase 2: hotspot at node (4,4) with a slow consumer
    phase = 2;
    for (int r = 0; r < PKTS_HOT; r++)
      for (int k = 0; k < NN; k++)
        if (k != HOT && $urandom_range(3) != 0) send_unicast(k, HOT);
        else if (k != HOT) send_multicast(k, 6);
    wait_drain(150000);
    phase = 3;
    wait_drain(50000);
    $display("all traffic done at cycle %0d, %0d deliveries pending", cycle, pending);
    checks++;
    if (pending != 0) begin
      failures++;
      $display("FAIL: %0d deliveries never arrived", pending);
    end
    for (int s = 0; s < NN; s++)
      for (int m = 0; m < 256; m++) begin
        if (exp_mask[s][m] != got_mask[s][m]) begin
          failures++;
          $display("FAIL: packet src %0d mid %0d missing destinations", s, m);
        end
      end
    $display("delivered %0d packet copies; mechanisms:", n_delivered);
    expect_count("congestion level >= 2", n_cl2);
    expect_count("second minimal path taken", n_min2);
    expect_count("non-minimal path taken", n_nonmin);
    expect_count("multicast copy and forward", n_fork);
    expect_count("weighted service (weight>1)", n_multi);
    expect_count("delivery back-pressure", n_bp);
    $display("  %-28s %0d", "local congestion flag cycles", n_lcf);
    expect_count("high-subnet delivery port", n_port0);
    expect_count("low-subnet delivery port", n_port1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d deliveries pending", pending);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
