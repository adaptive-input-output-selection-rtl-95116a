// congestion_detector: raises the Congestion Flag (CF) of one input buffer.
//
// The buffer is "warning full" (w_full) when at least THRESH of its DEPTH
// slots are occupied; THRESH = 6 is 75 % of the 8-flit buffer. Each clock
// edge the occupancy N_new is stored as N_old, and a comparator tells whether
// the buffer grew since the previous cycle. CF is asserted when the buffer
// is warning full and still filling (N_new > N_old), so a nearly full buffer
// that is draining does not repel traffic. CF goes to the upstream neighbour
// and to the CARS adder of the own router.
//
// Timing: w_full and cf are combinational in the current count and the
// registered previous count. The threshold comparison (>= rather than >) and
// the reset value of N_old (0) are this design's choices.
module congestion_detector #(
  parameter int DEPTH  = 8,
  parameter int THRESH = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] n_new,
  output logic                       w_full,
  output logic                       cf
);
  logic [$clog2(DEPTH+1)-1:0] n_old;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_old <= '0;
    else        n_old <= n_new;
  end

  assign w_full = (32'(n_new) >= THRESH);
  assign cf     = w_full && (n_new > n_old);
endmodule
