// tb_de_engine_ctrl: self-checking testbench of the engine controller.
//
// Plays the memory controllers and the network around the controller.
// Checks: writes to region 1+m strobe only memory controller m with the
// right offset and data; reads of region 1+m return that controller's read
// data; the NET register drives the network pattern, primary port and lane
// mask, the deal bit and GRAN the deal granularity; a start produces one `start` pulse, sets busy, is ignored while busy;
// the operation ends when all memory controllers report done, not before;
// CYCLES equals the cycles from start to completion and XFERS the number of
// cycles with a network transfer; STATUS shows busy and done.
module tb_de_engine_ctrl;
  import de_pkg::*;
  localparam int unsigned NM = 4, NP = 12;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic busy, done, start, net_fire = 0;
  logic mc_cfg_we [NM];
  logic [7:0] mc_cfg_addr;
  logic [31:0] mc_cfg_wdata;
  logic [31:0] mc_cfg_rdata [NM];
  logic mc_done [NM];
  net_mode_e net_mode;
  logic net_deal;
  logic [15:0] net_gran;
  logic [3:0] net_primary;
  logic [NP-1:0] net_lanes;
  int checks = 0, failures = 0, starts = 0;

  de_engine_ctrl #(.NUM_MC(NM), .NP(NP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb for (int m = 0; m < NM; m++) mc_cfg_rdata[m] = 32'h1000_0000 * (m + 1) | {24'd0, reg_addr[7:0]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    #1;
    for (int m = 0; m < NM; m++)
      check(mc_cfg_we[m] == (int'(a[11:8]) == m + 1), "write strobe decode");
    if (a[11:8] != 0) check(mc_cfg_addr == a[7:0] && mc_cfg_wdata == d, "forwarded offset/data");
    @(negedge clk); reg_we = 0;
  endtask

  logic [31:0] v;
  task automatic rd(input logic [11:0] a);
    reg_addr = a;
    #1;
    v = reg_rdata;
  endtask

  initial begin
    int n_fire;
    for (int m = 0; m < NM; m++) mc_done[m] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < NM; m++) begin
      wr(12'((m + 1) << 8) | 12'h05, 32'hCAFE_0000 + m);
      @(negedge clk);
      rd(12'((m + 1) << 8) | 12'h81); check(v == (32'h1000_0000 * (m + 1) | 32'h81), "mc read-back");
    end
    wr(12'h002, 32'h0A50_0032);
    @(negedge clk);
    rd(12'h002); check(v == 32'h0A50_0032, "NET read-back");
    check(net_mode == NET_MERGE && net_primary == 4'd3 && net_lanes == 12'hA50, "NET fields");
    rd(12'h001); check(v == 0, "STATUS idle after reset");
    check(!net_deal, "deal off");
    wr(12'h002, 32'h0A50_0036);
    wr(12'h005, 32'hFFFF_0123);
    @(negedge clk);
    check(net_deal && net_mode == NET_MERGE && net_gran == 16'h0123, "deal bit and granularity");
    rd(12'h005); check(v == 32'h0000_0123, "GRAN read-back");
    // operation of 37 cycles with a transfer every third cycle
    @(negedge clk); reg_we = 1; reg_addr = 12'h000; reg_wdata = 1;
    #1; check(start, "start pulse");
    for (int m = 0; m < NM; m++) mc_done[m] = 0;
    @(negedge clk); reg_we = 0; #1;
    check(busy && !done, "busy after start");
    n_fire = 0;
    for (int c = 1; c <= 40; c++) begin
      if (c == 10) begin
        reg_we = 1; reg_addr = 12'h000; reg_wdata = 1; #1;
        check(!start, "start ignored while busy");
      end
      net_fire = (c % 3 == 0);
      if (net_fire) n_fire++;
      if (c >= 20) mc_done[c % 2] = 1;
      if (c == 37) for (int m = 0; m < NM; m++) mc_done[m] = 1;
      @(negedge clk); reg_we = 0; net_fire = 0;
      if (c < 37) begin #1; check(busy, "still busy"); end
      if (c == 37) break;
    end
    #1;
    check(!busy && done, "done after all memory controllers finish");
    rd(12'h001); check(v == 32'h2, "STATUS done");
    rd(12'h003); check(v == 37, $sformatf("CYCLES = %0d", v));
    rd(12'h004); check(v == 32'(n_fire), $sformatf("XFERS = %0d", v));
    check(starts == 1, "exactly one start pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
