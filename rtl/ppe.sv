// ppe: programmable priority encoder of the round-robin arbiter.
//
// Grants the first asserted request at or after position ptr, wrapping
// around: gnt is one-hot (or zero) and any_gnt tells whether any request
// was asserted. Purely combinational.
module ppe #(
  parameter int N = 5
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] ptr,
  output logic [N-1:0]         gnt,
  output logic                 any_gnt
);
  always_comb begin
    int idx;
    gnt = '0;
    for (int k = N - 1; k >= 0; k--) begin
      idx = (32'(ptr) + k) % N;
      if (req[idx]) gnt = N'(1) << idx;
    end
    any_gnt = |req;
  end
endmodule
