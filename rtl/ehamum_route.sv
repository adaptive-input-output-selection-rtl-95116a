// ehamum_route: the Enhanced HAMUM routing function.
//
// Given the current node (cx, cy) and the destination (dx, dy) it returns up
// to three candidate output directions: two minimal ones (min1, min2) and
// one non-minimal one (nonmin). Nodes are labelled along a Hamiltonian path
// that runs east in even rows and west in odd rows; a packet whose
// destination lies in a higher row travels in the high-channel subnetwork
// (labels increase: north, east in even rows, west in odd rows), one in a
// lower row in the low-channel subnetwork (south, west in even rows, east in
// odd rows). Within those subnetworks the turn rules are:
//   high, even row: dest east          -> East (and North if > 1 row away)
//                   dest west/column   -> North, non-minimal East
//   high, odd row:  dest west          -> West (and North if > 1 row away)
//                   dest east/column   -> North, non-minimal West
//   low, even row:  dest west          -> West (and South if > 1 row away)
//                   dest east/column   -> South, non-minimal West
//   low, odd row:   dest east          -> East (and South if > 1 row away)
//                   dest west/column   -> South, non-minimal East
//   same row: East, West or Local.
// These rules follow the published algorithm. This design drops a
// non-minimal candidate that would leave the mesh at its east or west edge.
// Purely combinational; the Local code (DIR_L) is returned when the
// destination is the current node.
module ehamum_route
  import aios_pkg::*;
#(
  parameter int COLS = 8
) (
  input  addr_t cur,
  input  addr_t dst,
  output path_t min1,
  output path_t min2,
  output path_t nonmin
);
  logic even_row, at_east_edge, at_west_edge;
  logic [COORD_W-1:0] up_dist, down_dist;

  assign even_row     = ~cur.y[0];
  assign at_east_edge = (32'(cur.x) == COLS - 1);
  assign at_west_edge = (cur.x == '0);
  assign up_dist      = dst.y - cur.y;
  assign down_dist    = cur.y - dst.y;

  function automatic path_t p(dir_e d);
    return '{valid: 1'b1, dir: d};
  endfunction

  always_comb begin
    min1   = '{valid: 1'b0, dir: DIR_S};
    min2   = '{valid: 1'b0, dir: DIR_S};
    nonmin = '{valid: 1'b0, dir: DIR_S};
    if (dst.y == cur.y) begin
      if (dst.x == cur.x)     min1 = p(DIR_L);
      else if (dst.x > cur.x) min1 = p(DIR_E);
      else                    min1 = p(DIR_W);
    end else if (dst.y > cur.y) begin            // high-channel subnetwork
      if (even_row) begin
        if (dst.x > cur.x) begin
          min1 = p(DIR_E);
          if (up_dist > 1) min2 = p(DIR_N);
        end else begin
          min1 = p(DIR_N);
          if (!at_east_edge) nonmin = p(DIR_E);
        end
      end else begin
        if (dst.x < cur.x) begin
          min1 = p(DIR_W);
          if (up_dist > 1) min2 = p(DIR_N);
        end else begin
          min1 = p(DIR_N);
          if (!at_west_edge) nonmin = p(DIR_W);
        end
      end
    end else begin                               // low-channel subnetwork
      if (even_row) begin
        if (dst.x < cur.x) begin
          min1 = p(DIR_W);
          if (down_dist > 1) min2 = p(DIR_S);
        end else begin
          min1 = p(DIR_S);
          if (!at_west_edge) nonmin = p(DIR_W);
        end
      end else begin
        if (dst.x > cur.x) begin
          min1 = p(DIR_E);
          if (down_dist > 1) min2 = p(DIR_S);
        end else begin
          min1 = p(DIR_S);
          if (!at_east_edge) nonmin = p(DIR_E);
        end
      end
    end
  end
endmodule
