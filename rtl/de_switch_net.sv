// de_switch_net: programmable switching network of the data engine.
//
// Instead of a general crossbar, the original design merges the few switching
// patterns an application needs into one network and picks among them with
// engine registers. This network merges the patterns the original design was evaluated with:
//  * NET_REPLICATE: the primary port's read stream is copied to every lane
//    port's write stream (one lane: a plain copy, used also for transpose,
//    packing and unpacking, whose work is done by the memory controllers).
//  * NET_MERGE: the K lane read streams are interleaved into the primary
//    port's write stream; lane i supplies bits [i*W +: W] of each word, with
//    W = 32/K (K = 4: 8-bit elements, K = 2: 16-bit, K = 1: 32-bit).
//  * NET_STRIPE: each word of the primary read stream is split into K
//    elements of 32/K bits, element i going to lane i.
// With `deal` set, merge and stripe work on whole 32-bit words instead:
//  * NET_STRIPE + deal: the primary's words are dealt to the lanes in turn,
//    `gran` consecutive words to each lane (split an array across memories by
//    columns with gran = 1, by rows with gran = row length).
//  * NET_MERGE + deal: the dual; `gran` words are taken from each lane in
//    turn, reassembling an array that was split that way.
// The deal position restarts at lane 0 with `start`.
// Ports are numbered m*NUM_CH + c for channel c of memory controller m. The
// lanes are the ports set in `lane_mask`, lane 0 being the lowest-numbered;
// `primary` must not be among them. Patterns, lane order and element order are
// this design's choices; the K values follow the evaluated kernels.
//
// Every transfer is atomic across the ports involved: a word moves in the
// cycle the single-stream side and all lanes can take part, so all streams
// advance together (in deal mode: the single-stream side and the current
// lane). Apart from the deal position the network is combinational; `fire`
// marks a cycle in which a word moved. The valid signals it drives towards write channels
// depend on their ready signals, so those readies must not depend on valid
// (true of de_conv_fifo).
module de_switch_net
  import de_pkg::*;
#(
  parameter int unsigned NP = 12,
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              deal,
  input  logic [15:0]       gran,       // words per lane turn in deal mode (0 = 1)
  input  net_mode_e         mode,
  input  logic [PW-1:0]     primary,
  input  logic [NP-1:0]     lane_mask,
  // read streams leaving the memory controllers
  input  logic              src_valid [NP],
  input  logic [WORD_W-1:0] src_data  [NP],
  output logic              src_ready [NP],
  // write streams entering the memory controllers
  output logic              snk_valid [NP],
  output logic [WORD_W-1:0] snk_data  [NP],
  input  logic              snk_ready [NP],
  output logic              fire
);

  logic [NP-1:0]     lanes;
  logic [PW:0]       rank [NP];
  logic [PW:0]       k;
  logic [5:0]        lw;           // lane element width in bits
  logic [WORD_W-1:0] lmask;
  logic              lanes_ready, lanes_valid;
  logic [WORD_W-1:0] merged;
  logic [PW:0]       cur_q;       // lane whose turn it is (deal mode)
  logic [15:0]       gcnt_q;      // words moved in this turn
  logic              cur_valid, cur_ready;
  logic [WORD_W-1:0] cur_data;
  logic              is_cur [NP];

  always_comb begin
    lanes = lane_mask;
    lanes[primary] = 1'b0;
    k = '0;
    for (int p = 0; p < NP; p++) begin
      rank[p] = k;
      if (lanes[p]) k = k + 1'b1;
    end
    case (k)
      (PW+1)'(4): begin lw = 6'd8;  lmask = 32'h0000_00FF; end
      (PW+1)'(2): begin lw = 6'd16; lmask = 32'h0000_FFFF; end
      default:    begin lw = 6'd32; lmask = 32'hFFFF_FFFF; end
    endcase
  end

  always_comb begin
    lanes_ready = (k != '0);
    lanes_valid = (k != '0);
    merged      = '0;
    for (int p = 0; p < NP; p++) begin
      if (lanes[p]) begin
        lanes_ready = lanes_ready && snk_ready[p];
        lanes_valid = lanes_valid && src_valid[p];
        merged      = merged | ((src_data[p] & lmask) << (rank[p] * lw));
      end
    end
  end

  always_comb begin
    cur_valid = 1'b0;
    cur_ready = 1'b0;
    cur_data  = '0;
    for (int p = 0; p < NP; p++) begin
      is_cur[p] = lanes[p] && (rank[p] == cur_q);
      if (is_cur[p]) begin
        cur_valid = src_valid[p];
        cur_ready = snk_ready[p];
        cur_data  = src_data[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      gcnt_q <= '0;
    end else if (start) begin
      cur_q  <= '0;
      gcnt_q <= '0;
    end else if (fire && deal && (mode == NET_STRIPE || mode == NET_MERGE)) begin
      if (gcnt_q + 1'b1 >= gran) begin
        gcnt_q <= '0;
        cur_q  <= (cur_q + 1'b1 >= k) ? '0 : cur_q + 1'b1;
      end else begin
        gcnt_q <= gcnt_q + 1'b1;
      end
    end
  end

  always_comb begin
    fire = 1'b0;
    for (int p = 0; p < NP; p++) begin
      src_ready[p] = 1'b0;
      snk_valid[p] = 1'b0;
      snk_data[p]  = '0;
    end
    case (mode)
      NET_STRIPE, NET_MERGE: if (deal) begin
        if (mode == NET_STRIPE) begin
          fire = src_valid[primary] && cur_ready;
          src_ready[primary] = cur_ready;
          for (int p = 0; p < NP; p++) begin
            if (is_cur[p]) begin
              snk_valid[p] = fire;
              snk_data[p]  = src_data[primary];
            end
          end
        end else begin
          fire = cur_valid && snk_ready[primary];
          snk_valid[primary] = cur_valid;
          snk_data[primary]  = cur_data;
          for (int p = 0; p < NP; p++) begin
            if (is_cur[p]) src_ready[p] = snk_ready[primary];
          end
        end
      end else if (mode == NET_STRIPE) begin
        fire = src_valid[primary] && lanes_ready;
        src_ready[primary] = lanes_ready;
        for (int p = 0; p < NP; p++) begin
          if (lanes[p]) begin
            snk_valid[p] = fire;
            snk_data[p]  = (src_data[primary] >> (rank[p] * lw)) & lmask;
          end
        end
      end else begin
        fire = lanes_valid && snk_ready[primary];
        snk_valid[primary] = lanes_valid;
        snk_data[primary]  = merged;
        for (int p = 0; p < NP; p++) begin
          if (lanes[p]) src_ready[p] = fire;
        end
      end
      NET_REPLICATE: begin
        fire = src_valid[primary] && lanes_ready;
        src_ready[primary] = lanes_ready;
        for (int p = 0; p < NP; p++) begin
          if (lanes[p]) begin
            snk_valid[p] = fire;
            snk_data[p]  = src_data[primary];
          end
        end
      end
      default: ;
    endcase
  end

endmodule
