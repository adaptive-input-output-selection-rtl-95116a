// switch_allocator: one weighted round-robin arbiter per output port, and
// the ownership record of each output.
//
// An output port is owned by at most one input channel at a time, from the
// grant of a packet's header until its tail flit has passed (wormhole
// switching). A free output arbitrates among the input channels that request
// it and do not yet hold it; the winner owns it from the next cycle. The
// weight of each input is the congestion level (CL) of the router upstream
// of it, or this router's own CL for the local input. Ownership is released
// in the cycle after the owner's release pulse, so an output is idle for one
// cycle between packets. Which input's release frees the output is this
// design's detail; the per-output WRR arbiter is the published scheme.
module switch_allocator
  import aios_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_OUT-1:0] req_mask [NUM_IN],
  input  logic               release_i [NUM_IN],
  input  logic [CL_W-1:0]    weight [NUM_IN],
  output logic [NUM_OUT-1:0] own_mask [NUM_IN],
  output logic [NUM_OUT-1:0] busy,
  output logic [$clog2(NUM_IN)-1:0] owner [NUM_OUT],
  output logic [NUM_OUT-1:0] multi_serve   // a grant kept its priority (weight > 1)
);
  localparam int IW = $clog2(NUM_IN);

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    logic [NUM_IN-1:0] req, gnt;
    logic              any_gnt;
    logic [IW-1:0]     gidx;
    logic              hold;

    always_comb begin
      for (int i = 0; i < NUM_IN; i++) req[i] = req_mask[i][o];
      gidx = '0;
      for (int i = 0; i < NUM_IN; i++) if (gnt[i]) gidx = IW'(i);
    end

    wrr_arbiter #(.N(NUM_IN)) u_arb (
      .clk, .rst_n, .arb_en(!busy[o]), .req, .weight, .gnt, .any_gnt, .hold
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[o]        <= 1'b0;
        owner[o]       <= '0;
        multi_serve[o] <= 1'b0;
      end else begin
        multi_serve[o] <= 1'b0;
        if (any_gnt) begin
          busy[o]  <= 1'b1;
          owner[o] <= gidx;
          multi_serve[o] <= hold;
        end else if (busy[o] && release_i[owner[o]]) begin
          busy[o] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_IN; i++)
      for (int o = 0; o < NUM_OUT; o++)
        own_mask[i][o] = busy[o] && (owner[o] == IW'(i));
  end
endmodule
