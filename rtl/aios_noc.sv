// aios_noc: a COLS x ROWS mesh network-on-chip of AIOS routers.
//
// Tile (x, y) sits in column x and row y, row 0 at the south; nodes are
// labelled along the Hamiltonian path y*COLS + x in even rows and
// y*COLS + COLS-1-x in odd rows. Every router connects to its four
// neighbours by a pair of unidirectional links (flit, valid, ready), a
// congestion-flag wire in each direction and its 3-bit congestion level.
// Each tile's processing element injects packets through the router's local
// input and receives them through two delivery ports: port 0 for packets
// that arrived in the high-channel subnetwork, port 1 for the low-channel
// subnetwork; lcf tells the element that the router's local input buffer
// is congested. Node k = y*COLS + x indexes the tile arrays.
//
// At the mesh edge the missing neighbour is tied off: no flit arrives, the
// link is never ready, and its congestion flag reads as raised so that no
// adaptive choice points off the mesh. The processing elements themselves,
// which also split multicast destination sets and reorder packets by
// source address and message identifier, are outside this design.
// The defaults (8 x 8 mesh, 8-flit buffers, warning-full threshold 6 = 75 %)
// are the published evaluation setting.
module aios_noc
  import aios_pkg::*;
#(
  parameter int COLS   = 8,
  parameter int ROWS   = 8,
  parameter int DEPTH  = 8,
  parameter int THRESH = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  inj_valid [COLS*ROWS],
  input  flit_t inj_flit  [COLS*ROWS],
  output logic  inj_ready [COLS*ROWS],
  output logic  ej_valid  [COLS*ROWS][2],
  output flit_t ej_flit   [COLS*ROWS][2],
  input  logic  ej_ready  [COLS*ROWS][2],
  output logic [CL_W-1:0] cl [COLS*ROWS],
  output logic  lcf       [COLS*ROWS],     // local input congestion flag
  output logic  ev_min2   [COLS*ROWS],
  output logic  ev_nonmin [COLS*ROWS],
  output logic  ev_fork   [COLS*ROWS],
  output logic  ev_multi_serve [COLS*ROWS]
);
  localparam int NN = COLS * ROWS;

  logic  r_in_valid  [NN][NUM_IN];
  flit_t r_in_flit   [NN][NUM_IN];
  logic  r_in_ready  [NN][NUM_IN];
  logic  r_out_valid [NN][NUM_OUT];
  flit_t r_out_flit  [NN][NUM_OUT];
  logic  r_out_ready [NN][NUM_OUT];
  logic  r_cf_out    [NN][NUM_IN];
  logic [3:0]      r_nbr_cf [NN];    // bit = port code: S 0, N 1, W 2, E 3
  logic [CL_W-1:0] r_cl_in  [NN][4];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int K = y * COLS + x;
      localparam int KN = (y + 1) * COLS + x;
      localparam int KS = (y - 1) * COLS + x;
      localparam int KE = y * COLS + x + 1;
      localparam int KW = y * COLS + x - 1;

      aios_router #(
        .X(x), .Y(y), .COLS(COLS), .DEPTH(DEPTH), .THRESH(THRESH)
      ) u_router (
        .clk, .rst_n,
        .in_valid(r_in_valid[K]), .in_flit(r_in_flit[K]), .in_ready(r_in_ready[K]),
        .out_valid(r_out_valid[K]), .out_flit(r_out_flit[K]), .out_ready(r_out_ready[K]),
        .cf_out(r_cf_out[K]), .nbr_cf(r_nbr_cf[K]),
        .cl_out(cl[K]), .cl_in(r_cl_in[K]),
        .ev_min2(ev_min2[K]), .ev_nonmin(ev_nonmin[K]), .ev_fork(ev_fork[K]),
        .ev_multi_serve(ev_multi_serve[K])
      );

      // local port
      assign r_in_valid[K][IN_L]  = inj_valid[K];
      assign r_in_flit[K][IN_L]   = inj_flit[K];
      assign inj_ready[K]         = r_in_ready[K][IN_L];
      assign lcf[K]               = r_cf_out[K][IN_L];
      assign ej_valid[K][0]       = r_out_valid[K][DIR_L];
      assign ej_flit[K][0]        = r_out_flit[K][DIR_L];
      assign r_out_ready[K][DIR_L] = ej_ready[K][0];
      assign ej_valid[K][1]       = r_out_valid[K][DIR_L2];
      assign ej_flit[K][1]        = r_out_flit[K][DIR_L2];
      assign r_out_ready[K][DIR_L2] = ej_ready[K][1];

      // north side
      if (y < ROWS - 1) begin : g_n
        assign r_in_valid[K][IN_N]    = r_out_valid[KN][DIR_S];
        assign r_in_flit[K][IN_N]     = r_out_flit[KN][DIR_S];
        assign r_out_ready[K][DIR_N]  = r_in_ready[KN][IN_S];
        assign r_nbr_cf[K][1]     = r_cf_out[KN][IN_S];
        assign r_cl_in[K][IN_N]       = cl[KN];
      end else begin : g_n_edge
        assign r_in_valid[K][IN_N]    = 1'b0;
        assign r_in_flit[K][IN_N]     = '0;
        assign r_out_ready[K][DIR_N]  = 1'b0;
        assign r_nbr_cf[K][1]     = 1'b1;
        assign r_cl_in[K][IN_N]       = '0;
      end
      // south side
      if (y > 0) begin : g_s
        assign r_in_valid[K][IN_S]    = r_out_valid[KS][DIR_N];
        assign r_in_flit[K][IN_S]     = r_out_flit[KS][DIR_N];
        assign r_out_ready[K][DIR_S]  = r_in_ready[KS][IN_N];
        assign r_nbr_cf[K][0]     = r_cf_out[KS][IN_N];
        assign r_cl_in[K][IN_S]       = cl[KS];
      end else begin : g_s_edge
        assign r_in_valid[K][IN_S]    = 1'b0;
        assign r_in_flit[K][IN_S]     = '0;
        assign r_out_ready[K][DIR_S]  = 1'b0;
        assign r_nbr_cf[K][0]     = 1'b1;
        assign r_cl_in[K][IN_S]       = '0;
      end
      // east side
      if (x < COLS - 1) begin : g_e
        assign r_in_valid[K][IN_E]    = r_out_valid[KE][DIR_W];
        assign r_in_flit[K][IN_E]     = r_out_flit[KE][DIR_W];
        assign r_out_ready[K][DIR_E]  = r_in_ready[KE][IN_W];
        assign r_nbr_cf[K][3]     = r_cf_out[KE][IN_W];
        assign r_cl_in[K][IN_E]       = cl[KE];
      end else begin : g_e_edge
        assign r_in_valid[K][IN_E]    = 1'b0;
        assign r_in_flit[K][IN_E]     = '0;
        assign r_out_ready[K][DIR_E]  = 1'b0;
        assign r_nbr_cf[K][3]     = 1'b1;
        assign r_cl_in[K][IN_E]       = '0;
      end
      // west side
      if (x > 0) begin : g_w
        assign r_in_valid[K][IN_W]    = r_out_valid[KW][DIR_E];
        assign r_in_flit[K][IN_W]     = r_out_flit[KW][DIR_E];
        assign r_out_ready[K][DIR_W]  = r_in_ready[KW][IN_E];
        assign r_nbr_cf[K][2]     = r_cf_out[KW][IN_E];
        assign r_cl_in[K][IN_W]       = cl[KW];
      end else begin : g_w_edge
        assign r_in_valid[K][IN_W]    = 1'b0;
        assign r_in_flit[K][IN_W]     = '0;
        assign r_out_ready[K][DIR_W]  = 1'b0;
        assign r_nbr_cf[K][2]     = 1'b1;
        assign r_cl_in[K][IN_W]       = '0;
      end
    end
  end
endmodule
