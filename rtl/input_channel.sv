// input_channel: one router input port (IC): buffer, controller and routing
// unit.
//
// Flits arrive with a valid/ready handshake (in_ready = buffer not full) and
// wait in the input buffer. The controller watches the buffer fill level
// and raises the congestion flag cf (warning full and still filling) towards
// the upstream router. When a first header flit (BoM) reaches the head, the
// routing unit chooses one output port from the destination address and the
// congestion flags of the neighbours, and the choice is latched for the
// whole packet (wormhole switching). A multicast header whose first
// destination is this node requests the local delivery port and, if a
// further destination follows in the next header flit, also the output
// towards that next destination; the packet is then copied to both, and the
// reached destination is dropped from the header (the second destination
// moves into the first header flit, the second header flit is removed).
// The local delivery port is the high-subnetwork one (DIR_L) for packets
// that came from a lower-labelled neighbour, the low-subnetwork one (DIR_L2)
// otherwise.
//
// Handshake with the switch allocator: req_mask names the requested output
// ports from the cycle in which the header is decoded (combinationally, so
// a grant can come at the end of that cycle) until the tail flit has left;
// own_mask tells which of them this channel currently holds. A flit
// leaves (fire) in a cycle in which every requested port is held, every one
// of them is ready and the buffer is not empty; the flit appears on
// out_flit in that cycle. release pulses with the tail flit. The header is
// decoded in the cycle after it is written into the buffer. The two-port copy and the delivery-channel split
// are this design's realisation of the multicast and deadlock rules.
module input_channel
  import aios_pkg::*;
#(
  parameter int X      = 0,
  parameter int Y      = 0,
  parameter int COLS   = 8,
  parameter int PORT   = IN_L,
  parameter int DEPTH  = 8,
  parameter int THRESH = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  // upstream link
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic               in_ready,
  output logic               cf,
  // congestion flags of the neighbours, by port code S, N, W, E
  input  logic [3:0]         nbr_cf,
  // switch allocator and crossbar
  output logic [NUM_OUT-1:0] req_mask,
  input  logic [NUM_OUT-1:0] own_mask,
  input  logic [NUM_OUT-1:0] out_ready,
  output flit_t              out_flit,
  output logic               fire,
  output logic               release_o,
  // event strobes for monitoring (one cycle, at header decode)
  output logic               ev_min2,
  output logic               ev_nonmin,
  output logic               ev_fork
);
  localparam addr_t HERE = '{y: COORD_W'(Y), x: COORD_W'(X)};
  localparam int CW = $clog2(DEPTH + 1);

  typedef enum logic {IDLE, ACTIVE} state_e;

  state_e         state;
  flit_t          head0, head1;
  logic [CW-1:0]  count;
  logic           full, empty, w_full;
  logic           push, pop1, pop2;
  logic           merge;            // first flit still to be merged
  logic           decode;

  // routing
  addr_t          da0, da1, route_dst;
  dir_e           sel;
  logic           min2_taken, nonmin_taken;
  logic           at_dest, two_heads, need_second, head_ok;
  dir_e           local_port;
  logic [NUM_OUT-1:0] next_mask, dec_mask, req_q;

  assign push     = in_valid && !full;
  assign in_ready = !full;

  input_fifo #(.DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .push, .din(in_flit), .pop1, .pop2,
    .dout0(head0), .dout1(head1), .count, .full, .empty
  );

  congestion_detector #(.DEPTH(DEPTH), .THRESH(THRESH)) u_cd (
    .clk, .rst_n, .n_new(count), .w_full, .cf
  );

  // Which delivery channel: packets from a lower-labelled neighbour travel
  // in the high-channel subnetwork.
  always_comb begin
    unique case (PORT)
      IN_S:    local_port = DIR_L;
      IN_N:    local_port = DIR_L2;
      IN_W:    local_port = (Y % 2 == 0) ? DIR_L : DIR_L2;
      IN_E:    local_port = (Y % 2 == 1) ? DIR_L : DIR_L2;
      default: local_port = DIR_L;
    endcase
  end

  assign da0       = flit_da(head0);
  assign da1       = flit_da(head1);
  assign at_dest   = (da0 == HERE);
  assign need_second = flit_mcast(head0) && at_dest;
  assign two_heads = need_second && !flit_eoh(head1) && !flit_bom(head1);
  assign head_ok   = !empty && flit_bom(head0) && (!need_second || count >= CW'(2));
  assign route_dst = two_heads ? da1 : da0;

  routing_unit #(.COLS(COLS)) u_ru (
    .cur(HERE), .dst(route_dst), .nbr_cf, .sel, .min2_taken, .nonmin_taken
  );

  always_comb begin
    next_mask = '0;
    if (sel == DIR_L || sel == DIR_L2) next_mask[local_port] = 1'b1;
    else                               next_mask[sel]        = 1'b1;
  end

  assign decode = (state == IDLE) && head_ok;

  always_comb begin
    dec_mask = next_mask;
    if (need_second && !two_heads) begin      // last destination reached
      dec_mask = '0;
      dec_mask[local_port] = 1'b1;
    end else if (two_heads) begin             // deliver here and go on
      dec_mask[local_port] = 1'b1;
    end
  end

  // The request is presented already in the decode cycle, so a channel that
  // has just finished a packet competes in the very next arbitration; the
  // decision is latched at the same clock edge as a possible grant.
  assign req_mask = decode ? dec_mask : req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      req_q <= '0;
      merge <= 1'b0;
    end else if (decode) begin
      state <= ACTIVE;
      merge <= two_heads;
      req_q <= dec_mask;
    end else if (fire) begin
      merge <= 1'b0;
      if (flit_eom(out_flit)) begin
        state <= IDLE;
        req_q <= '0;
      end
    end
  end

  assign fire = (state == ACTIVE) && !empty && (req_q != '0)
             && ((own_mask & req_q) == req_q)
             && ((out_ready & req_q) == req_q);

  always_comb begin
    out_flit = head0;
    if (merge) out_flit[ADDR_W-1:0] = head1[ADDR_W-1:0];
  end

  assign pop1      = fire && !merge;
  assign pop2      = fire && merge;
  assign release_o = fire && flit_eom(out_flit);
  assign ev_min2   = decode && min2_taken && !(need_second && !two_heads);
  assign ev_nonmin = decode && nonmin_taken && !(need_second && !two_heads);
  assign ev_fork   = decode && two_heads;

  // A packet in the buffer must start with a first header flit.
  a_starts_with_header: assert property (@(posedge clk) disable iff (!rst_n)
    (state == IDLE && !empty) |-> flit_bom(head0));
endmodule
