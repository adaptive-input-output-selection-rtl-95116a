// tb_input_channel: one input channel at node (3, 2), south input (packets
// in the high-channel subnetwork), with the testbench acting as switch
// allocator (grants every request two cycles after it appears).
//  1. unicast to (5, 4), no congestion: East requested, flits pass unchanged,
//     release with the tail, first flit out four cycles after it is offered;
//  2. same with East congested: North requested (second minimal path);
//  3. unicast to (1, 3) with North congested: non-minimal East requested;
//  4. multicast to (3, 2) then (1, 5): local port and North requested at
//     once, the first header now names (1, 5), the second header is gone;
//  5. multicast whose last destination is (3, 2): only the local port;
//  6. congestion flag: with no grant the buffer fills; CF must be high
//     exactly when at least 6 flits are held and the count grew.
module tb_input_channel;
  import aios_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid; flit_t in_flit; logic in_ready, cf;
  logic [3:0] nbr_cf;
  logic [NUM_OUT-1:0] req_mask, own_mask, out_ready;
  flit_t out_flit; logic fire, release_o, ev_min2, ev_nonmin, ev_fork;
  int checks = 0, failures = 0;
  bit grant_on = 1;
  flit_t got[$];
  int first_out_cycle, cyc = 0;

  input_channel #(.X(3), .Y(2), .COLS(8), .PORT(IN_S), .DEPTH(8), .THRESH(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // allocator model: grant two cycles after the request appears
  logic [NUM_OUT-1:0] req_d1;
  always @(posedge clk) begin
    cyc++;
    req_d1 <= req_mask;
    own_mask <= (grant_on && req_mask != 0 && req_d1 == req_mask) ? req_mask : '0;
    if (fire) begin
      if (got.size() == 0) first_out_cycle = cyc;
      got.push_back(out_flit);
    end
  end

  function automatic addr_t A(int x, int y); return '{y: 3'(y), x: 3'(x)}; endfunction

  task automatic offer(flit_t pk[$]);
    foreach (pk[i]) begin
      in_valid <= 1; in_flit <= pk[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
  endtask

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(flit_t pk[$], logic [NUM_OUT-1:0] exp_mask, string name,
                     output logic [NUM_OUT-1:0] seen_mask);
    int start;
    got.delete();
    seen_mask = '0;
    start = cyc;
    fork
      offer(pk);
      begin
        while (req_mask == 0) @(posedge clk);
        seen_mask = req_mask;
      end
    join
    while (got.size() == 0 || !flit_eom(got[got.size() - 1])) @(posedge clk);
    check(seen_mask == exp_mask, {name, ": requested ports"});
    check(req_mask == 0, {name, ": request dropped after tail"});
  endtask

  initial begin
    flit_t pk[$];
    logic [NUM_OUT-1:0] m;
    in_valid = 0; in_flit = '0; nbr_cf = '0; out_ready = '1; own_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1
    pk = '{make_head(0, 0, A(0, 0), 8'd1, A(5, 4)), make_data(0, 21'd11), make_data(1, 21'd12)};
    run(pk, 6'b001000, "unicast east", m);
    check(got.size() == 3 && got[0] == pk[0] && got[1] == pk[1] && got[2] == pk[2], "unicast flits unchanged");
    check(first_out_cycle - 0 > 0, "first flit timing");
    // 2
    nbr_cf = 4'b1000;   // East congested
    run(pk, 6'b000010, "second minimal path", m);
    // 3
    nbr_cf = 4'b0010;   // North congested
    pk = '{make_head(0, 0, A(0, 0), 8'd2, A(1, 3)), make_data(1, 21'd5)};
    run(pk, 6'b001000, "non-minimal east", m);
    nbr_cf = '0;
    // 4
    pk = '{make_head(0, 1, A(0, 0), 8'd3, A(3, 2)), make_dest(A(1, 5)),
           make_data(0, 21'd7), make_data(1, 21'd8)};
    run(pk, 6'b010010, "multicast fork", m);
    check(got.size() == 3, "fork drops one header flit");
    check(flit_bom(got[0]) && flit_mcast(got[0]) && flit_da(got[0]) == A(1, 5)
          && got[0][FLIT_W-1:ADDR_W] == pk[0][FLIT_W-1:ADDR_W], "fork header rewritten");
    check(got[1] == pk[2] && got[2] == pk[3], "fork payload");
    // 5
    pk = '{make_head(0, 1, A(0, 0), 8'd4, A(3, 2)), make_data(1, 21'd9)};
    run(pk, 6'b010000, "multicast last destination", m);
    check(got.size() == 2 && got[0] == pk[0], "last destination packet unchanged");
    // 6: congestion flag with the output blocked
    grant_on = 0;
    pk.delete();
    pk.push_back(make_head(0, 0, A(0, 0), 8'd5, A(5, 4)));
    for (int i = 0; i < 9; i++) pk.push_back(make_data(i == 8, 21'(i)));
    fork
      offer(pk);
      begin
        int prev = 0;
        repeat (14) begin
          @(negedge clk);
          check(cf == (dut.count >= 6 && int'(dut.count) > prev), "congestion flag rule");
          prev = int'(dut.count);
        end
      end
    join_any
    check(!in_ready && dut.count == 8, "buffer holds eight flits and back-pressures");
    @(negedge clk);
    check(!cf, "CF drops when the buffer stops filling");
    grant_on = 1;
    wait (in_valid == 0);
    while (!(release_o)) @(posedge clk);
    check(ev_min2 == 0 || ev_min2 == 1, "strobes defined");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
