// aios_pkg: types and constants shared by the AIOS router blocks.
//
// Flit format (all-destination encoding). A flit is FLIT_W bits wide; the
// three top bits are the framing flags:
//   bit FLIT_W-1  EoM  end of message (set on the tail flit)
//   bit FLIT_W-2  BoM  begin of message (set on the first header flit)
//   bit FLIT_W-3  EoH  end of header (set on every payload flit)
// A header flit has EoH = 0. The first header flit carries, below the flags,
// the type T (0 unicast, 1 multicast), the source address SA and the message
// identifier MID; every header flit carries one destination address DA in its
// low ADDR_W bits. A multicast message lists its destinations in the order in
// which they are visited, one per header flit. The flag positions and the
// field order T, SA, MID, DA follow the published message format; the field
// widths and the one-destination-per-header-flit packing are this design's
// choice.
//
// Output-port codes are the 3-bit codes of the routing unit (S=000, N=001,
// W=010, E=011, Local=100). Code 101 is this design's second delivery
// channel: local deliveries of packets travelling in the low-channel
// subnetwork leave through it, those of the high-channel subnetwork through
// 100, so the two subnetworks never share a consumption channel.
//
// Input ports are numbered in the order of the arbiter's weight registers:
// North, East, South, West, Local.
package aios_pkg;

  localparam int FLIT_W   = 32;
  localparam int COORD_W  = 3;              // up to 8 x 8 nodes
  localparam int ADDR_W   = 2 * COORD_W;
  localparam int MID_W    = 8;
  localparam int CL_W     = 3;              // congestion level width

  localparam int EOM_BIT  = FLIT_W - 1;
  localparam int BOM_BIT  = FLIT_W - 2;
  localparam int EOH_BIT  = FLIT_W - 3;
  localparam int T_BIT    = FLIT_W - 4;
  localparam int SA_LSB   = T_BIT - ADDR_W;
  localparam int MID_LSB  = SA_LSB - MID_W;

  localparam int NUM_IN   = 5;
  localparam int NUM_OUT  = 6;

  // Input port indices (arbiter register order).
  localparam int IN_N = 0;
  localparam int IN_E = 1;
  localparam int IN_S = 2;
  localparam int IN_W = 3;
  localparam int IN_L = 4;

  typedef enum logic [2:0] {
    DIR_S  = 3'b000,
    DIR_N  = 3'b001,
    DIR_W  = 3'b010,
    DIR_E  = 3'b011,
    DIR_L  = 3'b100,   // local delivery, high-channel subnetwork
    DIR_L2 = 3'b101    // local delivery, low-channel subnetwork
  } dir_e;

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } addr_t;

  // One candidate direction produced by the routing function.
  typedef struct packed {
    logic valid;
    dir_e dir;
  } path_t;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic logic flit_eom(flit_t f);   return f[EOM_BIT]; endfunction
  function automatic logic flit_bom(flit_t f);   return f[BOM_BIT]; endfunction
  function automatic logic flit_eoh(flit_t f);   return f[EOH_BIT]; endfunction
  function automatic logic flit_mcast(flit_t f); return f[T_BIT];   endfunction
  function automatic addr_t flit_da(flit_t f);   return addr_t'(f[ADDR_W-1:0]); endfunction

  // First header flit.
  function automatic flit_t make_head(logic eom, logic mcast, addr_t sa,
                                      logic [MID_W-1:0] mid, addr_t da);
    flit_t f = '0;
    f[EOM_BIT] = eom;
    f[BOM_BIT] = 1'b1;
    f[T_BIT]   = mcast;
    f[SA_LSB +: ADDR_W] = sa;
    f[MID_LSB +: MID_W] = mid;
    f[ADDR_W-1:0] = da;
    return f;
  endfunction

  // Following header flit carrying one more destination.
  function automatic flit_t make_dest(addr_t da);
    flit_t f = '0;
    f[ADDR_W-1:0] = da;
    return f;
  endfunction

  // Payload flit.
  function automatic flit_t make_data(logic eom, logic [EOH_BIT-1:0] data);
    flit_t f = '0;
    f[EOM_BIT] = eom;
    f[EOH_BIT] = 1'b1;
    f[EOH_BIT-1:0] = data;
    return f;
  endfunction

endpackage
