// tb_data_engine_params: end-to-end test of the data reorganization engine
// built with non-default sizes: two memory controllers, two channels each,
// four AGU entries per controller, 12-bit addresses, 12-bit lengths and
// 4-word conversion FIFOs. It shows that the engine's generator parameters
// (number of memories, entries and address width) give a working engine
// when changed together, and that the network port numbering (port m*NUM_CH
// + c) follows NUM_CH.
// Operations:
//   transpose of a 6 x 4 matrix, memory 0 -> 1, with four write entries,
//     once with memories that grant every cycle and once every other cycle
//   MG-2/16 merge of two 16-bit streams, read and write sharing memory 0
//   replication of one stream into both channels of memory 1 with stride 2,
//     so each element fills two consecutive words
// Each operation is checked word by word against values computed here; the
// transpose at full grant rate must move one word per cycle.
module tb_data_engine_params;
  import de_pkg::*;
  localparam int unsigned NM = 2, NC = 2, NE = 4, AW = 12, LW = 12, FD = 4, WORDS = 4096;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic busy, done;
  logic mem_req [NM], mem_we [NM], mem_gnt [NM], mem_rvalid [NM];
  logic [AW-1:0] mem_addr [NM];
  logic [31:0] mem_wdata [NM], mem_rdata [NM];

  int checks = 0, failures = 0;
  int n_stall = 0, n_tp = 0, n_mg = 0, n_rp = 0;

  data_engine #(.NUM_MC(NM), .NUM_CH(NC), .NUM_ENTRIES(NE), .ADDR_W(AW), .LEN_W(LW),
                .FIFO_DEPTH(FD)) dut (.*);

  for (genvar m = 0; m < NM; m++) begin : g_mem
    de_mem_model #(.WORDS(WORDS), .ADDR_W(AW), .LAT(2)) u_mem (
      .clk, .rst_n, .mem_req(mem_req[m]), .mem_we(mem_we[m]), .mem_addr(mem_addr[m]),
      .mem_wdata(mem_wdata[m]), .mem_gnt(mem_gnt[m]), .mem_rvalid(mem_rvalid[m]),
      .mem_rdata(mem_rdata[m]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    for (int m = 0; m < NM; m++)
      if (mem_req[m] && !mem_gnt[m]) n_stall++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] mrd(int m, int a);
    return (m == 0) ? g_mem[0].u_mem.mem[a] : g_mem[1].u_mem.mem[a];
  endfunction
  task automatic mwr(int m, int a, logic [31:0] d);
    if (m == 0) g_mem[0].u_mem.mem[a] = d;
    else        g_mem[1].u_mem.mem[a] = d;
  endtask
  task automatic set_period(int p);
    g_mem[0].u_mem.gnt_period = p;
    g_mem[1].u_mem.gnt_period = p;
  endtask

  task automatic wreg(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_we = 0;
  endtask
  task automatic rreg(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1; d = reg_rdata;
  endtask
  function automatic logic [11:0] mca(int m, int off);
    return 12'(((m + 1) << 8) | off);
  endfunction
  task automatic chan(int m, int c, dir_e dir, elem_w_e ew, int first, int num, int len);
    ch_cfg_t cfg;
    cfg = '{num_entries: 4'(num), first_entry: 4'(first), ew: ew, dir: dir, en: 1'b1};
    wreg(mca(m, 4 * c), 32'(cfg));
    wreg(mca(m, 4 * c + 1), 32'(len));
  endtask
  task automatic entry(int m, int e, int base, int esz);
    wreg(mca(m, 8'h80 + 2 * e), 32'(base));
    wreg(mca(m, 8'h81 + 2 * e), 32'(esz));
  endtask
  task automatic net(net_mode_e mode, int primary, logic [15:0] lanes);
    wreg(12'h002, {lanes, 8'd0, 4'(primary), 2'd0, mode});
  endtask
  task automatic clear_channels();
    for (int m = 0; m < NM; m++) for (int c = 0; c < NC; c++) wreg(mca(m, 4 * c), 0);
  endtask
  task automatic run(output int cycles);
    logic [31:0] st;
    wreg(12'h000, 1);
    do @(posedge clk); while (busy);
    rreg(12'h001, st);
    check(st == 32'h2, "STATUS done after operation");
    rreg(12'h003, st);
    cycles = int'(st);
  endtask

  // Transpose rows x cols (cols <= NE) from memory 0 channel 0 (port 0) to
  // memory 1 channel 0 (port 2): write entry j starts column j.
  task automatic op_transpose(int rows, int cols, int period, output int cycles);
    clear_channels();
    set_period(period);
    for (int i = 0; i < rows * cols; i++) mwr(0, 12'h100 + i, $urandom);
    for (int i = 0; i < rows * cols; i++) mwr(1, 12'h200 + i, 32'hDEAD_BEEF);
    chan(0, 0, DIR_READ, EW32, 0, 1, rows * cols);
    entry(0, 0, 12'h100, 1);
    chan(1, 0, DIR_WRITE, EW32, 0, cols, rows * cols);
    for (int j = 0; j < cols; j++) entry(1, j, 12'h200 + j * rows, 1);
    net(NET_REPLICATE, 0, 16'b0100);
    run(cycles);
    for (int i = 0; i < rows; i++)
      for (int j = 0; j < cols; j++)
        check(mrd(1, 12'h200 + j * rows + i) == mrd(0, 12'h100 + i * cols + j),
              $sformatf("transpose element (%0d,%0d)", i, j));
    n_tp++;
  endtask

  // MG-2/16: lane 0 is memory 0 channel 1 (port 1), lane 1 is memory 1
  // channel 1 (port 3); the merged words go to memory 0 channel 0 (port 0).
  task automatic op_merge(int n);
    logic [31:0] exp;
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n / 2; i++) begin
      mwr(0, 12'h300 + i, $urandom);
      mwr(1, 12'h300 + i, $urandom);
    end
    chan(0, 1, DIR_READ, EW16, 1, 1, n / 2);
    entry(0, 1, 12'h300, 1);
    chan(1, 1, DIR_READ, EW16, 1, 1, n / 2);
    entry(1, 1, 12'h300, 1);
    chan(0, 0, DIR_WRITE, EW32, 2, 1, n);
    entry(0, 2, 12'h400, 1);
    net(NET_MERGE, 0, 16'b1010);
    run(cyc);
    for (int i = 0; i < n; i++) begin
      exp = {16'(mrd(1, 12'h300 + i / 2) >> (16 * (i % 2))),
             16'(mrd(0, 12'h300 + i / 2) >> (16 * (i % 2)))};
      check(mrd(0, 12'h400 + i) == exp, $sformatf("merge word %0d", i));
    end
    n_mg++;
  endtask

  // Replication into both channels of memory 1 (ports 2 and 3) with stride
  // 2 and bases dst and dst+1: each element fills two consecutive words.
  task automatic op_replicate_fill(int n);
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(0, 12'h500 + i, $urandom);
    chan(0, 0, DIR_READ, EW32, 0, 1, n);
    entry(0, 0, 12'h500, 1);
    chan(1, 0, DIR_WRITE, EW32, 2, 1, n);
    entry(1, 2, 12'h600, 2);
    chan(1, 1, DIR_WRITE, EW32, 3, 1, n);
    entry(1, 3, 12'h601, 2);
    net(NET_REPLICATE, 0, 16'b1100);
    run(cyc);
    for (int i = 0; i < 2 * n; i++)
      check(mrd(1, 12'h600 + i) == mrd(0, 12'h500 + i / 2), $sformatf("replica word %0d", i));
    n_rp++;
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    op_transpose(6, 4, 1, cyc);
    $display("transpose 6x4, grant every cycle: %0d cycles for 24 words", cyc);
    check(cyc <= 24 + 16, "one word per cycle");
    op_transpose(6, 4, 2, cyc);
    $display("transpose 6x4, grant every other cycle: %0d cycles for 24 words", cyc);
    check(cyc <= 2 * 24 + 16, "one word per two cycles");
    op_merge(16);
    op_replicate_fill(12);

    $display("mechanisms: stall=%0d tp=%0d mg=%0d rp=%0d", n_stall, n_tp, n_mg, n_rp);
    check(n_stall > 0, "memory stall happened");
    check(n_tp == 2 && n_mg == 1 && n_rp == 1, "every operation ran");
    check(g_mem[0].u_mem.bad_addr + g_mem[1].u_mem.bad_addr == 0, "every access inside the memories");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
