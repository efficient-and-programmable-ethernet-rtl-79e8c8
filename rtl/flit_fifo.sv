// flit_fifo: synchronous first-in first-out buffer of DEPTH words.
//
// Used for the ten-flit VC input buffers of the router and the VC buffers
// of the fabric port.  DEPTH need not be a power of two: the pointers wrap
// at DEPTH.  The word at the head is visible on dout while !empty (first
// word fall-through); pop removes it at the clock edge.  push and pop may
// happen in the same cycle.  Pushing when full or popping when empty is a
// protocol error caught by assertions; the flow control around the buffer
// (credits) must prevent it.
module flit_fifo #(
  parameter int W     = 66,
  parameter int DEPTH = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd, wr;
  logic [AW:0]   cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (AW+1)'(DEPTH));
  assign dout  = mem[rd];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= '0;
      wr  <= '0;
      cnt <= '0;
    end else begin
      if (push) wr <= nxt(wr);
      if (pop)  rd <= nxt(rd);
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
