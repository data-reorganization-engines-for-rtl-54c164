// de_mem_ctrl: memory controller of the data reorganization engine.
//
// One memory controller serves one memory module. As in the original design it is
// built from a channel controller, one conversion FIFO per data port and an
// address generation unit (AGU) with several stream entries. Each of the
// NUM_CH ports is a channel that, per operation, either reads a stream out of
// the memory towards the switching network or writes a stream coming from
// the network into the memory.
//
// Configuration registers (word offsets inside this controller's region, see
// de_pkg): CH_CFG and CH_LEN per channel, BASE and ELEM_SIZE per AGU entry.
// `cfg_we` writes `cfg_wdata` to `cfg_addr` at the clock edge; `cfg_rdata`
// returns the register at `cfg_addr` combinationally. `start` restarts every
// stream: counts return to zero and lengths are reloaded. `all_done` rises
// once every enabled channel has finished.
//
// Network side, per channel c: a read channel offers elements on
// src_valid/src_data and takes src_ready; a write channel accepts elements on
// snk_valid/snk_data and drives snk_ready. Memory side: see de_chan_ctrl.
module de_mem_ctrl
  import de_pkg::*;
#(
  parameter int unsigned NUM_CH      = 3,
  parameter int unsigned NUM_ENTRIES = 8,
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned LEN_W       = 20,
  parameter int unsigned FIFO_DEPTH  = 8,
  localparam int unsigned SEL_W      = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1,
  localparam int unsigned LVL_W      = ((FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1) + 1,
  localparam int unsigned CH_W       = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // registers
  input  logic              cfg_we,
  input  logic [7:0]        cfg_addr,
  input  logic [WORD_W-1:0] cfg_wdata,
  output logic [WORD_W-1:0] cfg_rdata,
  input  logic              start,
  output logic              all_done,
  // switching network
  output logic              src_valid [NUM_CH],
  output logic [WORD_W-1:0] src_data  [NUM_CH],
  input  logic              src_ready [NUM_CH],
  input  logic              snk_valid [NUM_CH],
  input  logic [WORD_W-1:0] snk_data  [NUM_CH],
  output logic              snk_ready [NUM_CH],
  // memory subsystem
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [WORD_W-1:0] mem_rdata
);

  ch_cfg_t          ch_cfg_q [NUM_CH];
  logic [LEN_W-1:0] ch_len_q [NUM_CH];

  // register decode
  logic             is_entry;
  logic             ch_ok;
  logic [CH_W-1:0]  reg_ch;
  logic [SEL_W-1:0] reg_entry;
  assign is_entry  = (cfg_addr >= MC_ENTRY_BASE);
  assign ch_ok     = int'(cfg_addr[7:2]) < NUM_CH;
  assign reg_ch    = CH_W'(cfg_addr[7:2]);
  assign reg_entry = SEL_W'(cfg_addr[6:1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CH; c++) begin
        ch_cfg_q[c] <= '0;
        ch_len_q[c] <= '0;
      end
    end else if (cfg_we && !is_entry && ch_ok) begin
      if (cfg_addr[1:0] == 2'd0) ch_cfg_q[reg_ch] <= ch_cfg_t'(cfg_wdata[$bits(ch_cfg_t)-1:0]);
      if (cfg_addr[1:0] == 2'd1) ch_len_q[reg_ch] <= cfg_wdata[LEN_W-1:0];
    end
  end

  // address generation unit
  logic [SEL_W-1:0]  agu_sel;
  logic              agu_advance;
  logic [ADDR_W-1:0] agu_addr, rd_base, rd_esz;

  de_agu #(.NUM_ENTRIES(NUM_ENTRIES), .ADDR_W(ADDR_W)) u_agu (
    .clk, .rst_n,
    .wr_en(cfg_we && is_entry), .wr_entry(reg_entry), .wr_is_esz(cfg_addr[0]),
    .wr_data(cfg_wdata[ADDR_W-1:0]),
    .rd_entry(reg_entry), .rd_base, .rd_esz,
    .clear(start), .sel(agu_sel), .advance(agu_advance),
    .addr(agu_addr), .count()
  );

  always_comb begin
    cfg_rdata = '0;
    if (is_entry) begin
      cfg_rdata = WORD_W'(cfg_addr[0] ? rd_esz : rd_base);
    end else if (ch_ok) begin
      if (cfg_addr[1:0] == 2'd0) cfg_rdata = WORD_W'(ch_cfg_q[reg_ch]);
      if (cfg_addr[1:0] == 2'd1) cfg_rdata = WORD_W'(ch_len_q[reg_ch]);
    end
  end

  // conversion FIFOs
  logic [LVL_W-1:0]  fifo_level [NUM_CH];
  logic              fifo_empty [NUM_CH];
  logic [WORD_W-1:0] fifo_dout  [NUM_CH];
  logic              fifo_push  [NUM_CH];
  logic              fifo_pop   [NUM_CH];

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    de_conv_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear(start),
      .dir(ch_cfg_q[c].dir), .ew(ch_cfg_q[c].ew),
      .mem_push(fifo_push[c]), .mem_din(mem_rdata),
      .mem_pop(fifo_pop[c]), .mem_dout(fifo_dout[c]),
      .mem_empty(fifo_empty[c]), .level(fifo_level[c]),
      .out_valid(src_valid[c]), .out_data(src_data[c]), .out_ready(src_ready[c]),
      .in_valid(snk_valid[c]), .in_data(snk_data[c]), .in_ready(snk_ready[c])
    );
  end

  de_chan_ctrl #(
    .NUM_CH(NUM_CH), .NUM_ENTRIES(NUM_ENTRIES), .ADDR_W(ADDR_W),
    .LEN_W(LEN_W), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_cc (
    .clk, .rst_n, .start,
    .cfg(ch_cfg_q), .len(ch_len_q),
    .fifo_level, .fifo_empty, .fifo_dout, .fifo_push, .fifo_pop,
    .agu_sel, .agu_advance, .agu_addr,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid,
    .all_done
  );

endmodule
