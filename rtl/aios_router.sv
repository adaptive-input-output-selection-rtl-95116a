// aios_router: the Adaptive Input-Output Selection (AIOS) router of one
// mesh tile.
//
// Five input channels (North, East, South, West, Local), each with its own
// buffer, congestion detector and routing unit; a switch allocator with one
// weighted round-robin arbiter per output port; a crossbar; and the CARS
// adder that turns the congestion flags of the four neighbour-facing input
// channels into the router's 3-bit congestion level CL.
//
// Output selection (adaptive, minimal or non-minimal Enhanced HAMUM) looks
// at the congestion flags nbr_cf that the neighbours raise on the channels
// facing this router. Input selection weights each input by the CL of the
// router upstream of it (cl_in), so that inputs behind congested routers
// send up to four packets per turn.
//
// Ports. Inputs are indexed N=0, E=1, S=2, W=3, Local=4; outputs by port
// code S=0, N=1, W=2, E=3, local delivery high subnetwork=4, local delivery
// low subnetwork=5. Links use valid/ready: a flit moves when valid and ready
// are both high at a clock edge; in_ready depends only on the buffer state,
// so no combinational path runs from out_ready to in_ready. cf_out[i] is the
// congestion flag of input i (to the neighbour on that side), cl_out the
// router's CL (to all neighbours). A flit entering an idle router leaves it
// two cycles later at the earliest (buffer write; header decode and grant;
// transfer).
// The two local delivery ports are this design's addition for the
// published two-delivery-channel rule; all else follows the published
// router structure.
module aios_router
  import aios_pkg::*;
#(
  parameter int X      = 0,
  parameter int Y      = 0,
  parameter int COLS   = 8,
  parameter int DEPTH  = 8,
  parameter int THRESH = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid [NUM_IN],
  input  flit_t              in_flit  [NUM_IN],
  output logic               in_ready [NUM_IN],
  output logic               out_valid [NUM_OUT],
  output flit_t              out_flit  [NUM_OUT],
  input  logic               out_ready [NUM_OUT],
  output logic               cf_out [NUM_IN],
  input  logic [3:0]         nbr_cf,          // by port code S, N, W, E
  output logic [CL_W-1:0]    cl_out,
  input  logic [CL_W-1:0]    cl_in [4],       // by input index N, E, S, W
  // monitoring strobes
  output logic               ev_min2,
  output logic               ev_nonmin,
  output logic               ev_fork,
  output logic               ev_multi_serve
);
  logic [NUM_OUT-1:0] req_mask [NUM_IN];
  logic [NUM_OUT-1:0] own_mask [NUM_IN];
  logic [NUM_OUT-1:0] out_ready_v;
  logic [NUM_OUT-1:0] out_valid_v;
  logic [NUM_OUT-1:0] busy, multi_serve;
  logic [$clog2(NUM_IN)-1:0] owner [NUM_OUT];
  flit_t              ic_flit [NUM_IN];
  logic               ic_fire [NUM_IN];
  logic               ic_rel  [NUM_IN];
  logic [NUM_IN-1:0]  e_min2, e_nonmin, e_fork;
  logic [CL_W-1:0]    weight [NUM_IN];

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      out_ready_v[o] = out_ready[o];
      out_valid[o]   = out_valid_v[o];
    end
  end

  for (genvar i = 0; i < NUM_IN; i++) begin : g_ic
    input_channel #(
      .X(X), .Y(Y), .COLS(COLS), .PORT(i), .DEPTH(DEPTH), .THRESH(THRESH)
    ) u_ic (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_flit(in_flit[i]), .in_ready(in_ready[i]),
      .cf(cf_out[i]), .nbr_cf,
      .req_mask(req_mask[i]), .own_mask(own_mask[i]), .out_ready(out_ready_v),
      .out_flit(ic_flit[i]), .fire(ic_fire[i]), .release_o(ic_rel[i]),
      .ev_min2(e_min2[i]), .ev_nonmin(e_nonmin[i]), .ev_fork(e_fork[i])
    );
  end

  cars u_cars (
    .cf({cf_out[IN_W], cf_out[IN_S], cf_out[IN_E], cf_out[IN_N]}),
    .cl(cl_out)
  );

  always_comb begin
    for (int i = 0; i < 4; i++) weight[i] = cl_in[i];
    weight[IN_L] = cl_out;
  end

  switch_allocator u_sa (
    .clk, .rst_n, .req_mask, .release_i(ic_rel), .weight,
    .own_mask, .busy, .owner, .multi_serve
  );

  crossbar u_xbar (
    .in_flit(ic_flit), .in_fire(ic_fire), .busy, .owner,
    .out_flit, .out_valid(out_valid_v)
  );

  assign ev_min2        = |e_min2;
  assign ev_nonmin      = |e_nonmin;
  assign ev_fork        = |e_fork;
  assign ev_multi_serve = |multi_serve;
endmodule
