// routing_unit: address decoder and output-port selection of one input
// channel.
//
// The Enhanced HAMUM function (ehamum_route) proposes up to two minimal
// directions and one non-minimal direction for the destination of a header.
// The selection then reads the congestion flags (CF) that the neighbouring
// routers raise on the input channels facing this router, and picks:
//   MinPath1 if it exists and its neighbour is not congested, else
//   MinPath2 if it exists and its neighbour is not congested, else
//   NonminPath if it exists and its neighbour is not congested, else
//   MinPath1.
// This is the published selection procedure. The local port has no
// congestion flag. The result is the 3-bit port code (S 000, N 001, W 010,
// E 011, Local 100); nonmin_taken tells that the non-minimal path won and
// min2_taken that the second minimal path won. Purely combinational.
module routing_unit
  import aios_pkg::*;
#(
  parameter int COLS = 8
) (
  input  addr_t      cur,
  input  addr_t      dst,
  input  logic [3:0] nbr_cf,       // indexed by port code: S, N, W, E
  output dir_e       sel,
  output logic       min2_taken,
  output logic       nonmin_taken
);
  path_t min1, min2, nonmin;

  ehamum_route #(.COLS(COLS)) u_route (
    .cur, .dst, .min1, .min2, .nonmin
  );

  function automatic logic congested(path_t pth, logic [3:0] cfv);
    return (pth.dir == DIR_L || pth.dir == DIR_L2) ? 1'b0 : cfv[pth.dir[1:0]];
  endfunction

  always_comb begin
    sel          = min1.dir;
    min2_taken   = 1'b0;
    nonmin_taken = 1'b0;
    if (min1.valid && !congested(min1, nbr_cf)) begin
      sel = min1.dir;
    end else if (min2.valid && !congested(min2, nbr_cf)) begin
      sel        = min2.dir;
      min2_taken = 1'b1;
    end else if (nonmin.valid && !congested(nonmin, nbr_cf)) begin
      sel          = nonmin.dir;
      nonmin_taken = 1'b1;
    end
  end
endmodule
