// cars: Contention Aware Routing Selection, the congestion-level adder.
//
// Adds the congestion flags of the four neighbour-facing input channels
// (North, East, South, West; the local channel is not counted) into the
// 3-bit Congestion Level (CL) of the router, 0 to 4. CL is sent to all four
// neighbours, whose arbiters use it as the weight of the input port that
// faces this router. Purely combinational.
module cars
  import aios_pkg::*;
(
  input  logic [3:0]      cf,   // congestion flags, any order
  output logic [CL_W-1:0] cl
);
  always_comb begin
    cl = '0;
    for (int i = 0; i < 4; i++) cl = cl + CL_W'(cf[i]);
  end
endmodule
