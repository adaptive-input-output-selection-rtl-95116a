// wrr_arbiter: weighted round-robin arbiter of one output port.
//
// A round-robin core (programmable priority encoder, pointer register
// P_enc) extended with one down-counting weight register per input. When
// arb_en is high (the output is free) and some input requests, the encoder
// grants the first request at or after P_enc. The granted input's register
// is then loaded with its weight, the congestion level CL of the upstream
// router behind that input, unless it still holds a count from an earlier
// grant; it counts down by one per granted packet. While the count stays
// above zero the pointer is set to the granted input, which keeps the
// priority; when it reaches zero ("Zero") the pointer moves one past the
// granted input, as in plain round robin. An input with CL = c is therefore
// served max(c, 1) packets in a row, at most four. The registers of inputs
// not granted are cleared, so a served input that stops requesting starts
// afresh next time.
//
// One arbitration decision is a packet grant; the caller holds the output
// for the whole packet and raises arb_en again when it is free. Grant is
// combinational in req and the registers; the registers update on the clock
// edge of a grant. Clearing the other registers and counting max(c, 1) are
// this design's reading of the weight rule.
module wrr_arbiter
  import aios_pkg::*;
#(
  parameter int N = NUM_IN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arb_en,
  input  logic [N-1:0]         req,
  input  logic [CL_W-1:0]      weight [N],
  output logic [N-1:0]         gnt,
  output logic                 any_gnt,
  output logic                 hold      // grant keeps the priority (count left)
);
  localparam int PW = $clog2(N);

  logic [PW-1:0]   p_enc;
  logic [CL_W-1:0] cnt [N];
  logic [N-1:0]    ppe_gnt;
  logic            ppe_any;
  logic [PW-1:0]   g_idx;
  logic [CL_W-1:0] remaining;

  ppe #(.N(N)) u_ppe (.req(req), .ptr(p_enc), .gnt(ppe_gnt), .any_gnt(ppe_any));

  assign gnt     = arb_en ? ppe_gnt : '0;
  assign any_gnt = arb_en & ppe_any;
  assign hold    = any_gnt && (remaining != CL_W'(1));

  always_comb begin
    g_idx = '0;
    for (int i = 0; i < N; i++) if (ppe_gnt[i]) g_idx = PW'(i);
    // packets still to serve, this one included
    remaining = (cnt[g_idx] != '0) ? cnt[g_idx]
              : (weight[g_idx] != '0) ? weight[g_idx] : CL_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_enc <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else if (any_gnt) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
      cnt[g_idx] <= remaining - 1'b1;
      if (remaining == CL_W'(1))            // Zero: rotate past the winner
        p_enc <= (32'(g_idx) == N - 1) ? '0 : g_idx + 1'b1;
      else
        p_enc <= g_idx;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
