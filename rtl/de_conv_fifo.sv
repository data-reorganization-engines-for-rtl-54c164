// de_conv_fifo: conversion FIFO between the memory data bus and one I/O port.
//
// Every data port of a memory controller has a FIFO queue that absorbs memory
// latency and decouples the network's schedule from the memory's (as in the
// original design). The queue holds whole 32-bit memory words; the "conversion"
// is packing and unpacking of narrower elements, the operation the original design
// names for fitting K elements into one 32-bit word. With element width 8,
// 16 or 32 bits a word holds 4, 2 or 1 elements, element 0 in the least
// significant bits (this design's choice of order).
//
// Read channel (dir = DIR_READ): the channel controller pushes memory words
// (`mem_push`, `mem_din`); the port side presents one element at a time on
// `out_data` (zero-extended to 32 bits) with a valid/ready handshake, and a
// word leaves the queue after its last element is taken.
// Write channel (dir = DIR_WRITE): elements arrive on `in_*`; every K-th one
// completes a word that is queued; the channel controller reads the head on
// `mem_dout` and removes it with `mem_pop` when the memory takes the write.
// `dir` and `ew` must stay constant during an operation; `clear` empties the
// queue and restarts packing. A transfer happens in the cycle valid and ready
// are both high; `out_valid` and `in_ready` never depend on the other side's
// valid or ready.
module de_conv_fifo
  import de_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  dir_e              dir,
  input  elem_w_e           ew,
  // memory side
  input  logic              mem_push,
  input  logic [WORD_W-1:0] mem_din,
  input  logic              mem_pop,
  output logic [WORD_W-1:0] mem_dout,
  output logic              mem_empty,
  output logic [AW:0]       level,
  // port side, read channel
  output logic              out_valid,
  output logic [WORD_W-1:0] out_data,
  input  logic              out_ready,
  // port side, write channel
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  output logic              in_ready
);

  logic              f_push, f_pop, f_empty, f_full;
  logic [WORD_W-1:0] f_din, f_dout;
  logic [1:0]        idx_q;      // element position inside the current word
  logic [WORD_W-1:0] pack_q;     // partly packed word (write channel)
  logic [1:0]        last_idx;
  logic [4:0]        shamt;
  logic [WORD_W-1:0] pack_next;
  logic              out_fire, in_fire;

  assign last_idx = 2'(elems_per_word(ew) - 3'd1);
  always_comb begin
    case (ew)
      EW8:     shamt = {idx_q, 3'b000};
      EW16:    shamt = {idx_q[0], 4'b0000};
      default: shamt = '0;
    endcase
  end

  assign out_valid = (dir == DIR_READ) && !f_empty;
  assign out_data  = (f_dout >> shamt) & elem_mask(ew);
  assign out_fire  = out_valid && out_ready;

  assign in_ready  = (dir == DIR_WRITE) && !f_full;
  assign in_fire   = in_valid && in_ready;
  assign pack_next = pack_q | ((in_data & elem_mask(ew)) << shamt);

  always_comb begin
    if (dir == DIR_READ) begin
      f_push = mem_push;
      f_din  = mem_din;
      f_pop  = out_fire && (idx_q == last_idx);
    end else begin
      f_push = in_fire && (idx_q == last_idx);
      f_din  = pack_next;
      f_pop  = mem_pop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q  <= '0;
      pack_q <= '0;
    end else if (clear) begin
      idx_q  <= '0;
      pack_q <= '0;
    end else if (out_fire || in_fire) begin
      if (idx_q == last_idx) begin
        idx_q  <= '0;
        pack_q <= '0;
      end else begin
        idx_q  <= idx_q + 1'b1;
        if (in_fire) pack_q <= pack_next;
      end
    end
  end

  de_fifo #(.W(WORD_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear,
    .push(f_push), .din(f_din), .pop(f_pop), .dout(f_dout),
    .empty(f_empty), .full(f_full), .level
  );

  assign mem_dout  = f_dout;
  assign mem_empty = f_empty;

endmodule
