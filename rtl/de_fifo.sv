// de_fifo: synchronous first-in first-out buffer.
//
// DEPTH entries of W bits held in a register array with read and write
// pointers. `push` writes `din` at the clock edge, `pop` removes the head;
// both may happen in the same cycle. `dout` shows the head combinationally
// whenever `empty` is low. `level` counts the stored entries. `clear` empties
// the buffer. Pushing when full or popping when empty is a caller error and is
// flagged by assertions. A helper of the conversion FIFO and the channel
// controller; the original design asks for FIFO queues at every data port without
// giving their insides, so this structure is this design's own.
module de_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [AW:0]  level
);

  logic [W-1:0]  mem_q [DEPTH];
  logic [AW-1:0] wptr_q, rptr_q;
  logic [AW:0]   cnt_q;

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else if (clear) begin
      wptr_q <= '0;
      rptr_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) wptr_q <= bump(wptr_q);
      if (pop)  rptr_q <= bump(rptr_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wptr_q] <= din;
  end

  assign dout  = mem_q[rptr_q];
  assign empty = (cnt_q == '0);
  assign full  = (cnt_q == (AW+1)'(DEPTH));
  assign level = cnt_q;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
