// crossbar: the router's switch, connecting input channels to output ports.
//
// Each output port takes the flit of the input channel that owns it and
// signals valid when that channel moves a flit (fire). An input channel may
// own two outputs at once (a multicast copy to the local port and onward),
// in which case the same flit appears on both. Purely combinational; the
// ownership comes from the switch allocator.
module crossbar
  import aios_pkg::*;
(
  input  flit_t                     in_flit [NUM_IN],
  input  logic                      in_fire [NUM_IN],
  input  logic [NUM_OUT-1:0]        busy,
  input  logic [$clog2(NUM_IN)-1:0] owner [NUM_OUT],
  output flit_t                     out_flit [NUM_OUT],
  output logic [NUM_OUT-1:0]        out_valid
);
  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      out_flit[o]  = in_flit[owner[o]];
      out_valid[o] = busy[o] && in_fire[owner[o]];
    end
  end
endmodule
