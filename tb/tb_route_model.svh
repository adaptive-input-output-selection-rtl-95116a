// Reference model of the Enhanced HAMUM candidates, written from the
// Hamiltonian-path rules rather than from the branch structure: a packet in
// the high (low) subnetwork may only move to a neighbour with a higher
// (lower) label; a minimal candidate reduces the distance and leaves the
// destination reachable by such moves; the non-minimal candidate is the
// label-monotone horizontal move that does not reduce the distance.
// Direction numbering: 0 S, 1 N, 2 W, 3 E, 4 Local.

function automatic int m_label(int x, int y, int cols);
  return (y % 2 == 0) ? y * cols + x : y * cols + cols - 1 - x;
endfunction

function automatic bit m_step(int x, int y, int d, output int nx, output int ny);
  nx = x; ny = y;
  case (d)
    0: ny = y - 1;
    1: ny = y + 1;
    2: nx = x - 1;
    3: nx = x + 1;
    default: ;
  endcase
  return 1'b1;
endfunction

// Can (x,y) reach (dx,dy) by distance-reducing label-monotone moves?
function automatic bit m_reach(int x, int y, int dx, int dy, bit high, int cols);
  int nx, ny;
  if (x == dx && y == dy) return 1'b1;
  for (int d = 0; d < 4; d++) begin
    void'(m_step(x, y, d, nx, ny));
    if (nx < 0 || ny < 0 || nx >= cols || ny >= 8) continue;
    if ((nx - dx) * (nx - dx) + 0 > (x - dx) * (x - dx) && d >= 2) continue;
    if (((nx > dx ? nx - dx : dx - nx) + (ny > dy ? ny - dy : dy - ny)) >=
        ((x > dx ? x - dx : dx - x) + (y > dy ? y - dy : dy - y))) continue;
    if (high  && m_label(nx, ny, cols) <= m_label(x, y, cols)) continue;
    if (!high && m_label(nx, ny, cols) >= m_label(x, y, cols)) continue;
    if (m_reach(nx, ny, dx, dy, high, cols)) return 1'b1;
  end
  return 1'b0;
endfunction

// Returns the minimal candidate set as a bit mask over directions 0..4 and
// the non-minimal candidate (-1 if none).
function automatic void m_candidates(int x, int y, int dx, int dy, int cols,
                                     output logic [4:0] minmask, output int nonmin);
  int nx, ny;
  bit high;
  minmask = '0;
  nonmin  = -1;
  if (x == dx && y == dy) begin minmask[4] = 1'b1; return; end
  high = m_label(dx, dy, cols) > m_label(x, y, cols);
  for (int d = 0; d < 4; d++) begin
    int dist0, dist1;
    void'(m_step(x, y, d, nx, ny));
    if (nx < 0 || ny < 0 || nx >= cols || ny >= 8) continue;
    if (high  && m_label(nx, ny, cols) <= m_label(x, y, cols)) continue;
    if (!high && m_label(nx, ny, cols) >= m_label(x, y, cols)) continue;
    dist0 = (x > dx ? x - dx : dx - x) + (y > dy ? y - dy : dy - y);
    dist1 = (nx > dx ? nx - dx : dx - nx) + (ny > dy ? ny - dy : dy - ny);
    if (dist1 < dist0) begin
      if (m_reach(nx, ny, dx, dy, high, cols)) minmask[d] = 1'b1;
    end else if (d >= 2 && y != dy) begin
      nonmin = d;
    end
  end
endfunction
