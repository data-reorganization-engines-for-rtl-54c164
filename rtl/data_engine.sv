// data_engine: data reorganization engine for a system-on-chip FPGA.
//
// Copies arrays between memory modules and reorganizes them on the way:
// transpose, merging of several narrow streams into one word stream,
// striping of one stream across several memories, splitting an array across
// memories by rows or columns and merging it back, replication, packing and
// unpacking of narrow elements. Following the original engine structure it
// holds a controller with externally visible registers, NUM_MC memory
// controllers (four in the original engine) and a
// programmable switching network between them.
//
// Each memory controller has NUM_CH channels; each channel streams data
// between its memory and one network port along an affine address sequence
// base + count * elem_size. Network port m*NUM_CH + c is channel c of memory
// controller m. The controller's register map is described in de_pkg and
// de_engine_ctrl. A typical operation: program each channel (direction,
// element width, AGU entries, length), the AGU entries (base, stride) and the
// network pattern, then write CTRL.start and wait for STATUS.done.
//
// Memory port m (one per memory controller): an access is taken when
// mem_req[m] and mem_gnt[m] are high in the same cycle; read data returns in
// order on mem_rvalid[m]/mem_rdata[m] one or more cycles later. With a memory
// that takes one access per cycle, a copy through one channel pair moves one
// 32-bit word per cycle; throughput falls to the rate at which the memories
// grant accesses. Sizes (channels, entries, FIFO depth, address width) are this
// design's choices; the original leaves them as generator parameters.
module data_engine
  import de_pkg::*;
#(
  parameter int unsigned NUM_MC      = 4,
  parameter int unsigned NUM_CH      = 3,
  parameter int unsigned NUM_ENTRIES = 8,
  parameter int unsigned ADDR_W      = 20,
  parameter int unsigned LEN_W       = 20,
  parameter int unsigned FIFO_DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic              reg_we,
  input  logic [11:0]       reg_addr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  output logic              busy,
  output logic              done,
  // memory ports, one per memory controller
  output logic              mem_req    [NUM_MC],
  output logic              mem_we     [NUM_MC],
  output logic [ADDR_W-1:0] mem_addr   [NUM_MC],
  output logic [WORD_W-1:0] mem_wdata  [NUM_MC],
  input  logic              mem_gnt    [NUM_MC],
  input  logic              mem_rvalid [NUM_MC],
  input  logic [WORD_W-1:0] mem_rdata  [NUM_MC]
);

  localparam int unsigned NP = NUM_MC * NUM_CH;
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;

  logic              mc_cfg_we    [NUM_MC];
  logic [7:0]        mc_cfg_addr;
  logic [WORD_W-1:0] mc_cfg_wdata;
  logic [WORD_W-1:0] mc_cfg_rdata [NUM_MC];
  logic              mc_done      [NUM_MC];
  logic              start;
  net_mode_e         net_mode;
  logic              net_deal;
  logic [15:0]       net_gran;
  logic [PW-1:0]     net_primary;
  logic [NP-1:0]     net_lanes;
  logic              net_fire;

  logic              src_valid [NP];
  logic [WORD_W-1:0] src_data  [NP];
  logic              src_ready [NP];
  logic              snk_valid [NP];
  logic [WORD_W-1:0] snk_data  [NP];
  logic              snk_ready [NP];

  de_engine_ctrl #(.NUM_MC(NUM_MC), .NP(NP)) u_ctrl (
    .clk, .rst_n,
    .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .busy, .done,
    .mc_cfg_we, .mc_cfg_addr, .mc_cfg_wdata, .mc_cfg_rdata, .mc_done, .start,
    .net_mode, .net_deal, .net_gran, .net_primary, .net_lanes, .net_fire
  );

  for (genvar m = 0; m < NUM_MC; m++) begin : g_mc
    logic              m_src_valid [NUM_CH];
    logic [WORD_W-1:0] m_src_data  [NUM_CH];
    logic              m_src_ready [NUM_CH];
    logic              m_snk_valid [NUM_CH];
    logic [WORD_W-1:0] m_snk_data  [NUM_CH];
    logic              m_snk_ready [NUM_CH];

    for (genvar c = 0; c < NUM_CH; c++) begin : g_port
      assign src_valid[m*NUM_CH+c] = m_src_valid[c];
      assign src_data[m*NUM_CH+c]  = m_src_data[c];
      assign m_src_ready[c]        = src_ready[m*NUM_CH+c];
      assign m_snk_valid[c]        = snk_valid[m*NUM_CH+c];
      assign m_snk_data[c]         = snk_data[m*NUM_CH+c];
      assign snk_ready[m*NUM_CH+c] = m_snk_ready[c];
    end

    de_mem_ctrl #(
      .NUM_CH(NUM_CH), .NUM_ENTRIES(NUM_ENTRIES), .ADDR_W(ADDR_W),
      .LEN_W(LEN_W), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_mc (
      .clk, .rst_n,
      .cfg_we(mc_cfg_we[m]), .cfg_addr(mc_cfg_addr), .cfg_wdata(mc_cfg_wdata),
      .cfg_rdata(mc_cfg_rdata[m]), .start, .all_done(mc_done[m]),
      .src_valid(m_src_valid), .src_data(m_src_data), .src_ready(m_src_ready),
      .snk_valid(m_snk_valid), .snk_data(m_snk_data), .snk_ready(m_snk_ready),
      .mem_req(mem_req[m]), .mem_we(mem_we[m]), .mem_addr(mem_addr[m]),
      .mem_wdata(mem_wdata[m]), .mem_gnt(mem_gnt[m]),
      .mem_rvalid(mem_rvalid[m]), .mem_rdata(mem_rdata[m])
    );
  end

  de_switch_net #(.NP(NP)) u_net (
    .clk, .rst_n, .start, .deal(net_deal), .gran(net_gran),
    .mode(net_mode), .primary(net_primary), .lane_mask(net_lanes),
    .src_valid, .src_data, .src_ready,
    .snk_valid, .snk_data, .snk_ready,
    .fire(net_fire)
  );

endmodule
