// de_engine_ctrl: data engine controller and its registers.
//
// The original design gives the engine a simple control interface with externally
// visible registers through which other units program the memory controllers
// and read the engine's overall status. This block is that interface. The
// register map (see de_pkg) and its behaviour are this design's own:
//  * Region 0 holds the global registers: CTRL (write 1 to bit 0 to start an
//    operation, ignored while busy), STATUS (bit 0 busy, bit 1 done, the
//    latter cleared by the next start), NET (network pattern, primary port,
//    lane mask, deal bit), GRAN (words per lane turn when dealing), CYCLES
//    (clock cycles of the last operation, from start to completion) and
//    XFERS (network transfers in the last operation).
//  * Region 1+m is forwarded to memory controller m: writes as a one-cycle
//    strobe with the 8-bit offset, reads through its combinational read port.
// An operation starts with a one-cycle `start` pulse to every memory
// controller and ends in the first later cycle in which all of them report
// `mc_done`.
//
// Register port: `reg_we` writes `reg_wdata` at `reg_addr` at the clock edge;
// `reg_rdata` shows the register at `reg_addr` in the same cycle.
module de_engine_ctrl
  import de_pkg::*;
#(
  parameter int unsigned NUM_MC = 4,
  parameter int unsigned NP     = 12,
  localparam int unsigned PW    = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // external register port
  input  logic              reg_we,
  input  logic [11:0]       reg_addr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  output logic              busy,
  output logic              done,
  // memory controllers
  output logic              mc_cfg_we    [NUM_MC],
  output logic [7:0]        mc_cfg_addr,
  output logic [WORD_W-1:0] mc_cfg_wdata,
  input  logic [WORD_W-1:0] mc_cfg_rdata [NUM_MC],
  input  logic              mc_done      [NUM_MC],
  output logic              start,
  // switching network
  output net_mode_e         net_mode,
  output logic              net_deal,
  output logic [15:0]       net_gran,
  output logic [PW-1:0]     net_primary,
  output logic [NP-1:0]     net_lanes,
  input  logic              net_fire
);

  logic [3:0]        region;
  logic [7:0]        offs;
  logic              busy_q, done_q;
  logic [WORD_W-1:0] net_q, cycles_q, xfers_q;
  logic [15:0]       gran_q;
  logic              all_mc_done;

  assign region = reg_addr[11:8];
  assign offs   = reg_addr[7:0];
  assign start  = reg_we && region == 4'd0 && offs == REG_CTRL && reg_wdata[0] && !busy_q;

  always_comb begin
    all_mc_done = 1'b1;
    for (int m = 0; m < NUM_MC; m++) all_mc_done = all_mc_done && mc_done[m];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      done_q   <= 1'b0;
      net_q    <= '0;
      gran_q   <= '0;
      cycles_q <= '0;
      xfers_q  <= '0;
    end else begin
      if (reg_we && region == 4'd0 && offs == REG_NET)  net_q  <= reg_wdata;
      if (reg_we && region == 4'd0 && offs == REG_GRAN) gran_q <= reg_wdata[15:0];
      if (start) begin
        busy_q   <= 1'b1;
        done_q   <= 1'b0;
        cycles_q <= '0;
        xfers_q  <= '0;
      end else if (busy_q) begin
        cycles_q <= cycles_q + 1'b1;
        if (net_fire) xfers_q <= xfers_q + 1'b1;
        if (all_mc_done) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy         = busy_q;
  assign done         = done_q;
  assign net_mode     = net_mode_e'(net_q[1:0]);
  assign net_deal     = net_q[2];
  assign net_gran     = gran_q;
  assign net_primary  = PW'(net_q[7:4]);
  assign net_lanes    = NP'(net_q[31:16]);
  assign mc_cfg_addr  = offs;
  assign mc_cfg_wdata = reg_wdata;

  always_comb begin
    for (int m = 0; m < NUM_MC; m++)
      mc_cfg_we[m] = reg_we && (int'(region) == m + 1);
  end

  always_comb begin
    reg_rdata = '0;
    if (region == 4'd0) begin
      case (offs)
        REG_STATUS: reg_rdata = {30'd0, done_q, busy_q};
        REG_NET:    reg_rdata = net_q;
        REG_CYCLES: reg_rdata = cycles_q;
        REG_XFERS:  reg_rdata = xfers_q;
        REG_GRAN:   reg_rdata = {16'd0, gran_q};
        default:    reg_rdata = '0;
      endcase
    end else begin
      for (int m = 0; m < NUM_MC; m++)
        if (int'(region) == m + 1) reg_rdata = mc_cfg_rdata[m];
    end
  end

endmodule
