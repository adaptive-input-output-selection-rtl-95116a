// input_fifo: the flit buffer of one router input channel.
//
// A register-based circular FIFO of DEPTH flits (registers rather than an
// SRAM, as in the published implementation). Besides the usual head entry it
// exposes the entry behind the head (dout1), because the input controller of
// a multicast packet that has reached one of its destinations replaces the
// first destination address with the second before forwarding. pop2 removes
// both entries in one cycle. count is the number of occupied slots and feeds
// the congestion detector.
//
// Timing: push and pop act on the rising clock edge; a flit pushed in cycle t
// is visible at dout0 in cycle t+1. push when full and pops beyond the fill
// level are rule violations checked by assertions. Reset empties the buffer.
// DEPTH = 8 follows the buffer size used in the performance evaluation.
module input_fifo
  import aios_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int W     = FLIT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               din,
  input  logic                       pop1,   // remove the head
  input  logic                       pop2,   // remove head and next
  output logic [W-1:0]               dout0,
  output logic [W-1:0]               dout1,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full,
  output logic                       empty
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr, rd_ptr1;
  logic [CW-1:0] n_pop;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign rd_ptr1 = inc(rd_ptr);
  assign dout0   = mem[rd_ptr];
  assign dout1   = mem[rd_ptr1];
  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign n_pop   = pop2 ? CW'(2) : (pop1 ? CW'(1) : CW'(0));

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop2)      rd_ptr <= inc(rd_ptr1);
      else if (pop1) rd_ptr <= rd_ptr1;
      count <= count + CW'(push) - n_pop;
    end
  end

  // Handshake rules: the writer respects full, the reader the fill level.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) n_pop <= count);
endmodule
