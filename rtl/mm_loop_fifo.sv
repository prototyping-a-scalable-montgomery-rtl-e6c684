// mm_loop_fifo: first-word-fall-through FIFO that holds the words leaving the
// last processing element until the first processing element takes them for
// the next pass over the pipeline.
//
// When the operand has more words than the pipeline has room for in flight
// (e > 2K), the last PE delivers word 0 of a pass before the first PE has
// finished the previous pass; the difference (e - 2K words) waits here. The
// control unit bypasses the FIFO when it is empty and the first PE is ready.
//
// dout shows the oldest entry whenever empty is low (combinational read);
// push and pop act at the clock edge; clr empties the FIFO synchronously.
// Pushing when full or popping when empty is a usage error (asserted).
module mm_loop_fifo #(
  parameter int unsigned DW    = 64,    // entry width
  parameter int unsigned DEPTH = 130    // number of entries
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          push,
  input  logic [DW-1:0] din,
  input  logic          pop,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= incr(wptr);
      if (pop)  rptr <= incr(rptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (clr) !(push && full && !pop))
    else $error("mm_loop_fifo: push when full");
  assert property (@(posedge clk) disable iff (clr) !(pop && empty))
    else $error("mm_loop_fifo: pop when empty");

endmodule
