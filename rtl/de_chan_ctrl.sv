// de_chan_ctrl: channel controller of one memory controller.
//
// Shares one memory port among NUM_CH channels, each a finite affine stream
// that either reads memory into its conversion FIFO or writes its FIFO to
// memory. As in the original design, the channel controller drives the memory
// control signals and the select of the address generation unit (AGU); the
// rest is this design's own choice:
//  * A channel owns the AGU entries first_entry .. first_entry+num_entries-1
//    and uses them in turn, one per access. With one entry it walks a single
//    strided stream; with C entries whose bases are the starts of C columns
//    it writes a row-major stream in transposed order.
//  * A read channel may issue only while its FIFO has room for every read it
//    already has in flight, so returning data always fits.
//  * A write channel issues when its FIFO holds a complete word.
//  * Channels that may issue are served round-robin, one access per cycle.
//  * Read data returns in order; a small queue of channel numbers steers each
//    returning word to the FIFO of the channel that asked for it.
//
// Memory port: an access is taken in the cycle `mem_req` and `mem_gnt` are
// both high (`mem_gnt` may be high without a request). Read data arrives later
// on `mem_rvalid`/`mem_rdata`, in request order, with any latency of at least
// one cycle. `start` loads the stream lengths (`len`, in memory accesses) and
// restarts every channel. `all_done` is high when every enabled channel has
// made all its accesses and, for a read channel, the network has drained its
// FIFO.
module de_chan_ctrl
  import de_pkg::*;
#(
  parameter int unsigned NUM_CH      = 3,
  parameter int unsigned NUM_ENTRIES = 8,
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned LEN_W       = 20,
  parameter int unsigned FIFO_DEPTH  = 8,
  localparam int unsigned SEL_W      = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1,
  localparam int unsigned CH_W       = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned LVL_W      = ((FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  ch_cfg_t           cfg        [NUM_CH],
  input  logic [LEN_W-1:0]  len        [NUM_CH],
  // conversion FIFOs
  input  logic [LVL_W-1:0]  fifo_level [NUM_CH],
  input  logic              fifo_empty [NUM_CH],
  input  logic [WORD_W-1:0] fifo_dout  [NUM_CH],
  output logic              fifo_push  [NUM_CH],
  output logic              fifo_pop   [NUM_CH],
  // address generation unit
  output logic [SEL_W-1:0]  agu_sel,
  output logic              agu_advance,
  input  logic [ADDR_W-1:0] agu_addr,
  // memory subsystem
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  output logic              all_done
);

  localparam int unsigned OUT_W = LVL_W + 1;

  logic [LEN_W-1:0] rem_q   [NUM_CH];
  logic [3:0]       ent_q   [NUM_CH];
  logic [OUT_W-1:0] outst_q [NUM_CH];
  logic [CH_W-1:0]  last_q;

  logic             elig [NUM_CH];
  logic             any_elig;
  logic [CH_W-1:0]  g;
  logic             take;

  // Which channels may issue this cycle.
  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      if (!cfg[c].en || rem_q[c] == '0) begin
        elig[c] = 1'b0;
      end else if (cfg[c].dir == DIR_READ) begin
        elig[c] = (OUT_W'(fifo_level[c]) + outst_q[c]) < OUT_W'(FIFO_DEPTH);
      end else begin
        elig[c] = !fifo_empty[c];
      end
    end
  end

  // Round-robin choice, starting after the channel served last.
  always_comb begin
    int unsigned idx;
    any_elig = 1'b0;
    g        = '0;
    for (int k = 1; k <= NUM_CH; k++) begin
      idx = (int'(last_q) + k) % NUM_CH;
      if (!any_elig && elig[idx]) begin
        any_elig = 1'b1;
        g        = CH_W'(idx);
      end
    end
  end

  assign agu_sel     = SEL_W'(cfg[g].first_entry + ent_q[g]);
  assign mem_req     = any_elig;
  assign mem_we      = (cfg[g].dir == DIR_WRITE);
  assign mem_addr    = agu_addr;
  assign mem_wdata   = fifo_dout[g];
  assign take        = mem_req && mem_gnt;
  assign agu_advance = take;

  // Queue of channel numbers of the reads in flight.
  logic            tag_empty, tag_full;
  logic [CH_W-1:0] tag_head;
  logic            tag_push;
  assign tag_push = take && !mem_we;

  de_fifo #(.W(CH_W), .DEPTH(NUM_CH * FIFO_DEPTH)) u_tags (
    .clk, .rst_n, .clear(start),
    .push(tag_push), .din(g), .pop(mem_rvalid), .dout(tag_head),
    .empty(tag_empty), .full(tag_full), .level()
  );

  always_comb begin
    for (int c = 0; c < NUM_CH; c++) begin
      fifo_push[c] = mem_rvalid && (tag_head == CH_W'(c));
      fifo_pop[c]  = take && mem_we && (g == CH_W'(c));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= CH_W'(NUM_CH - 1);
      for (int c = 0; c < NUM_CH; c++) begin
        rem_q[c]   <= '0;
        ent_q[c]   <= '0;
        outst_q[c] <= '0;
      end
    end else if (start) begin
      last_q <= CH_W'(NUM_CH - 1);
      for (int c = 0; c < NUM_CH; c++) begin
        rem_q[c]   <= cfg[c].en ? len[c] : '0;
        ent_q[c]   <= '0;
        outst_q[c] <= '0;
      end
    end else begin
      if (take) begin
        last_q   <= g;
        rem_q[g] <= rem_q[g] - 1'b1;
        if (ent_q[g] + 1'b1 >= cfg[g].num_entries) ent_q[g] <= '0;
        else                                       ent_q[g] <= ent_q[g] + 1'b1;
      end
      for (int c = 0; c < NUM_CH; c++) begin
        outst_q[c] <= outst_q[c]
                    + OUT_W'(tag_push && g == CH_W'(c))
                    - OUT_W'(fifo_push[c]);
      end
    end
  end

  always_comb begin
    all_done = 1'b1;
    for (int c = 0; c < NUM_CH; c++) begin
      if (cfg[c].en && (rem_q[c] != '0 || outst_q[c] != '0 || !fifo_empty[c]))
        all_done = 1'b0;
    end
  end

  a_rvalid_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rvalid |-> !tag_empty);
  a_tags_fit: assert property (@(posedge clk) disable iff (!rst_n)
    tag_push |-> !tag_full);

endmodule
