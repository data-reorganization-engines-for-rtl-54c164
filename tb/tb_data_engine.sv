// tb_data_engine: end-to-end testbench of the data reorganization engine.
//
// Four behavioural memories hang on the engine's four memory ports. A host
// task programs the engine through its register port, starts an operation,
// waits for STATUS.done and compares the destination memories with results
// computed here from the source data. The engine runs with its default sizes.
// Operations, after the kernels the original design was evaluated with, plus the packing
// operations it lists:
//   TP-32   transpose of a 16 x 8 matrix of 32-bit words, memory 0 -> 1
//   MG-4/8  four streams of bytes merged into one word stream
//   MG-2/16 two streams of 16-bit halves merged
//   ST-4/8  one word stream striped across four byte streams
//   ST-2/16 one word stream striped across two 16-bit streams
//   RP-8/32 one word stream replicated into eight streams
//   RP-2/32 one word stream replicated into two memories
//   PACK / UNPACK  one 8-bit value per word <-> four values per word
//   in-memory transpose inside one memory (read and write share a port)
//   PAD     elements spaced 4 words apart by a write stride, and each element
//           expanded into 3 words by replication to three write channels
//   SPLIT / MERGE of whole elements by rows and by columns across memories
//   example an 8 x 8 matrix of 8-bit values copied transposed and packed
// Mechanisms counted, each must occur: memory stall (a request not granted),
// network back-pressure (a read stream waiting for a full write FIFO), a
// memory port shared by a read and a write channel, and each element width.
// Rates: with memories that grant every cycle, TP-32 must move one word per
// cycle (128 words within 128 + 16 cycles); with memories that grant every
// other cycle the copy must sustain one word per two cycles, 2 bytes per cycle,
// which is 80 MB/s at a 40 MHz clock.
module tb_data_engine;
  import de_pkg::*;
  localparam int unsigned NM = 4, NC = 3, AW = 20, WORDS = 8192;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [11:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic busy, done;
  logic mem_req [NM], mem_we [NM], mem_gnt [NM], mem_rvalid [NM];
  logic [AW-1:0] mem_addr [NM];
  logic [31:0] mem_wdata [NM], mem_rdata [NM];

  int checks = 0, failures = 0;
  int n_stall = 0, n_backpressure = 0, n_shared = 0;
  int n_tp = 0, n_mg = 0, n_st = 0, n_rp = 0, n_pack = 0, n_unpack = 0, n_inmem = 0;
  int n_ew [3] = '{default: 0};

  data_engine dut (.*);

  for (genvar m = 0; m < NM; m++) begin : g_mem
    de_mem_model #(.WORDS(WORDS), .ADDR_W(AW), .LAT(2)) u_mem (
      .clk, .rst_n, .mem_req(mem_req[m]), .mem_we(mem_we[m]), .mem_addr(mem_addr[m]),
      .mem_wdata(mem_wdata[m]), .mem_gnt(mem_gnt[m]), .mem_rvalid(mem_rvalid[m]),
      .mem_rdata(mem_rdata[m]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  bit seen_rd [NM], seen_wr [NM];
  always @(posedge clk) for (int m = 0; m < NM; m++)
    if (mem_req[m] && mem_gnt[m]) begin
      if (mem_we[m]) seen_wr[m] = 1; else seen_rd[m] = 1;
    end
  always @(posedge clk) if (rst_n && busy) begin
    for (int m = 0; m < NM; m++) if (mem_req[m] && !mem_gnt[m]) n_stall++;
    for (int p = 0; p < NM * NC; p++)
      if (dut.src_valid[p] && !dut.src_ready[p] && dut.net_mode == NET_REPLICATE) n_backpressure++;
  end

  // ---- memory access helpers (hierarchical, outside simulation time) ----
  function automatic logic [31:0] mrd(int m, int a);
    case (m)
      0: return g_mem[0].u_mem.mem[a];
      1: return g_mem[1].u_mem.mem[a];
      2: return g_mem[2].u_mem.mem[a];
      default: return g_mem[3].u_mem.mem[a];
    endcase
  endfunction
  task automatic mwr(int m, int a, logic [31:0] d);
    case (m)
      0: g_mem[0].u_mem.mem[a] = d;
      1: g_mem[1].u_mem.mem[a] = d;
      2: g_mem[2].u_mem.mem[a] = d;
      default: g_mem[3].u_mem.mem[a] = d;
    endcase
  endtask
  task automatic set_period(int p);
    g_mem[0].u_mem.gnt_period = p;
    g_mem[1].u_mem.gnt_period = p;
    g_mem[2].u_mem.gnt_period = p;
    g_mem[3].u_mem.gnt_period = p;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- register helpers ----
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
    n_ew[ew]++;
  endtask
  task automatic entry(int m, int e, int base, int esz);
    wreg(mca(m, 8'h80 + 2 * e), 32'(base));
    wreg(mca(m, 8'h81 + 2 * e), 32'(esz));
  endtask
  task automatic net(net_mode_e mode, int primary, logic [11:0] lanes);
    wreg(12'h002, {4'd0, lanes, 8'd0, 4'(primary), 2'd0, mode});
  endtask
  task automatic clear_channels();
    for (int m = 0; m < NM; m++) for (int c = 0; c < NC; c++) wreg(mca(m, 4 * c), 0);
  endtask
  task automatic run(output int cycles);
    logic [31:0] st;
    int shared;
    for (int m = 0; m < NM; m++) begin seen_rd[m] = 0; seen_wr[m] = 0; end
    wreg(12'h000, 1);
    do begin
      @(posedge clk);
    end while (busy);
    shared = 0;
    for (int m = 0; m < NM; m++) if (seen_rd[m] && seen_wr[m]) shared = 1;
    n_shared += shared;
    rreg(12'h001, st);
    check(st == 32'h2, "STATUS done after operation");
    rreg(12'h003, st);
    cycles = int'(st);
  endtask

  // ---- operations ----
  task automatic op_transpose(int rows, int cols, int period, output int cycles);
    clear_channels();
    set_period(period);
    for (int i = 0; i < rows * cols; i++) mwr(0, 16'h100 + i, $urandom);
    for (int i = 0; i < rows * cols; i++) mwr(1, 16'h800 + i, 32'hDEAD_BEEF);
    chan(0, 0, DIR_READ, EW32, 0, 1, rows * cols);
    entry(0, 0, 16'h100, 1);
    chan(1, 0, DIR_WRITE, EW32, 0, cols, rows * cols);
    for (int j = 0; j < cols; j++) entry(1, j, 16'h800 + j * rows, 1);
    net(NET_REPLICATE, 0, 12'b0000_0000_1000);
    run(cycles);
    for (int i = 0; i < rows; i++)
      for (int j = 0; j < cols; j++)
        check(mrd(1, 16'h800 + j * rows + i) == mrd(0, 16'h100 + i * cols + j),
              $sformatf("transpose element (%0d,%0d)", i, j));
    n_tp++;
  endtask

  // MERGE: K lane streams of N elements of 32/K bits, each stored packed in
  // memory m=lane (channel 1), merged into memory 0 channel 2.
  task automatic op_merge(int k, int n);
    int w, lanes[$];
    elem_w_e ew;
    logic [11:0] mask;
    logic [31:0] exp, el;
    w = 32 / k;
    ew = (k == 4) ? EW8 : EW16;
    clear_channels();
    set_period(1);
    mask = '0;
    for (int l = 0; l < k; l++) begin
      // lane l lives in memory l, channel 1 -> port 3*l + 1
      for (int i = 0; i < n / (32 / w); i++) mwr(l, 16'h200 + i, $urandom);
      chan(l, 1, DIR_READ, ew, 1, 1, n / (32 / w));
      entry(l, 1, 16'h200, 1);
      mask[3 * l + 1] = 1'b1;
    end
    chan(0, 2, DIR_WRITE, EW32, 2, 1, n);
    entry(0, 2, 16'hA00, 1);
    net(NET_MERGE, 2, mask);
    begin int cyc; run(cyc); end
    for (int i = 0; i < n; i++) begin
      exp = '0;
      for (int l = 0; l < k; l++) begin
        el = (mrd(l, 16'h200 + (i * w) / 32) >> ((i * w) % 32)) & ((64'd1 << w) - 1);
        exp |= el << (l * w);
      end
      check(mrd(0, 16'hA00 + i) == exp, $sformatf("merge k=%0d word %0d", k, i));
    end
    n_mg++;
  endtask

  // STRIPE: memory 0 channel 0 reads n words; lane l (memory l+? channel 2)
  // receives element l of each word, packed 32/w per word.
  task automatic op_stripe(int k, int n);
    int w, port [4];
    elem_w_e ew;
    logic [11:0] mask;
    logic [31:0] el, got;
    w = 32 / k;
    ew = (k == 4) ? EW8 : EW16;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(0, 16'h300 + i, $urandom);
    chan(0, 0, DIR_READ, EW32, 0, 1, n);
    entry(0, 0, 16'h300, 1);
    mask = '0;
    // lanes: memory 1, 2, 3 channel 2 and memory 0 channel 2 -> ports 5, 8, 11, 2
    for (int l = 0; l < k; l++) begin
      int mm;
      mm = (l + 1) % 4;
      chan(mm, 2, DIR_WRITE, ew, 3, 1, n * w / 32);
      entry(mm, 3, 16'hC00, 1);
      mask[3 * mm + 2] = 1'b1;
    end
    net(NET_STRIPE, 0, mask);
    begin int cyc; run(cyc); end
    // lane order is ascending port number: port 2 (mem 0) is lane 0
    for (int l = 0; l < k; l++) begin
      int mm;
      // lanes in port order: k = 4 -> ports 2,5,8,11 (memories 0..3);
      // k = 2 -> ports 5,8 (memories 1,2)
      mm = (k == 4) ? l : l + 1;
      for (int i = 0; i < n; i++) begin
        el  = (mrd(0, 16'h300 + i) >> (l * w)) & ((64'd1 << w) - 1);
        got = (mrd(mm, 16'hC00 + (i * w) / 32) >> ((i * w) % 32)) & ((64'd1 << w) - 1);
        check(got == el, $sformatf("stripe k=%0d lane %0d element %0d", k, l, i));
      end
    end
    n_st++;
  endtask

  // REPLICATE: memory 0 channel 0 -> the listed ports.
  task automatic op_replicate(int ports[$], int n, int period);
    logic [11:0] mask;
    int cyc;
    clear_channels();
    set_period(period);
    for (int i = 0; i < n; i++) mwr(0, 16'h400 + i, $urandom);
    chan(0, 0, DIR_READ, EW32, 0, 1, n);
    entry(0, 0, 16'h400, 1);
    mask = '0;
    foreach (ports[q]) begin
      int mm, cc;
      mm = ports[q] / 3; cc = ports[q] % 3;
      chan(mm, cc, DIR_WRITE, EW32, 4 + cc, 1, n);
      entry(mm, 4 + cc, 16'h1000 + 16'h100 * cc, 1);
      mask[ports[q]] = 1'b1;
    end
    net(NET_REPLICATE, 0, mask);
    run(cyc);
    foreach (ports[q]) begin
      int mm, cc;
      mm = ports[q] / 3; cc = ports[q] % 3;
      for (int i = 0; i < n; i++)
        check(mrd(mm, 16'h1000 + 16'h100 * cc + i) == mrd(0, 16'h400 + i),
              $sformatf("replica port %0d word %0d", ports[q], i));
    end
    n_rp++;
  endtask

  // PACK (pack=1): words holding one 8-bit value each in memory 2 become
  // packed words in memory 3; UNPACK (pack=0) the reverse.
  task automatic op_pack(bit pack, int n);
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(2, 16'h500 + i, pack ? {24'hABCDEF, 8'($urandom)} : $urandom);
    chan(2, 0, DIR_READ, pack ? EW32 : EW8, 0, 1, n);
    entry(2, 0, 16'h500, 1);
    chan(3, 0, DIR_WRITE, pack ? EW8 : EW32, 0, 1, pack ? n / 4 : n * 4);
    entry(3, 0, 16'h600, 1);
    net(NET_REPLICATE, 6, 12'b0010_0000_0000);
    run(cyc);
    if (pack) begin
      for (int i = 0; i < n; i++)
        check(8'(mrd(3, 16'h600 + i / 4) >> (8 * (i % 4))) == 8'(mrd(2, 16'h500 + i)),
              $sformatf("pack element %0d", i));
      n_pack++;
    end else begin
      for (int i = 0; i < 4 * n; i++)
        check(mrd(3, 16'h600 + i) == {24'd0, 8'(mrd(2, 16'h500 + i / 4) >> (8 * (i % 4)))},
              $sformatf("unpack element %0d", i));
      n_unpack++;
    end
  endtask

  // In-memory transpose inside memory 2 (read channel 0, write channel 1).
  task automatic op_inmem_transpose(int rows, int cols);
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < rows * cols; i++) mwr(2, 16'h700 + i, $urandom);
    chan(2, 0, DIR_READ, EW32, 0, 1, rows * cols);
    entry(2, 0, 16'h700, 1);
    chan(2, 1, DIR_WRITE, EW32, 1, cols, rows * cols);
    for (int j = 0; j < cols; j++) entry(2, 1 + j, 16'h900 + j * rows, 1);
    net(NET_REPLICATE, 6, 12'b0000_1000_0000);
    run(cyc);
    for (int i = 0; i < rows; i++)
      for (int j = 0; j < cols; j++)
        check(mrd(2, 16'h900 + j * rows + i) == mrd(2, 16'h700 + i * cols + j),
              $sformatf("in-memory transpose (%0d,%0d)", i, j));
    check(cyc >= 2 * rows * cols, "single memory serves read and write in turn");
    n_inmem++;
  endtask

  // Padding: n words copied from memory 0 into memory 1 with a write stride
  // of k words, so each element occupies the first of k words; the k-1 pad
  // words keep their previous (zero) contents.
  int n_pad = 0;
  task automatic op_pad(int k, int n);
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(0, 16'h1800 + i, $urandom);
    for (int i = 0; i < n * k; i++) mwr(1, 16'h1800 + i, 0);
    chan(0, 1, DIR_READ, EW32, 6, 1, n);
    entry(0, 6, 16'h1800, 1);
    chan(1, 1, DIR_WRITE, EW32, 6, 1, n);
    entry(1, 6, 16'h1800, k);
    net(NET_REPLICATE, 1, 12'b0000_0001_0000);
    run(cyc);
    for (int i = 0; i < n * k; i++)
      check(mrd(1, 16'h1800 + i) == ((i % k == 0) ? mrd(0, 16'h1800 + i / k) : 32'd0),
            $sformatf("padded word %0d", i));
    n_pad++;
  endtask

  // Filled padding: each of n words from memory 0 becomes k consecutive
  // copies in memory 1 (k <= 3). The read stream is replicated to k write
  // channels of memory 1; channel c writes word i to dst + i*k + c.
  int n_pad_fill = 0;
  task automatic op_pad_fill(int k, int n);
    int cyc;
    logic [11:0] mask;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(0, 16'h1A00 + i, $urandom);
    for (int i = 0; i < n * k; i++) mwr(1, 16'h1A00 + i, 0);
    chan(0, 0, DIR_READ, EW32, 0, 1, n);
    entry(0, 0, 16'h1A00, 1);
    mask = '0;
    for (int c = 0; c < k; c++) begin
      chan(1, c, DIR_WRITE, EW32, 4 + c, 1, n);
      entry(1, 4 + c, 16'h1A00 + c, k);
      mask[3 + c] = 1'b1;
    end
    net(NET_REPLICATE, 0, mask);
    run(cyc);
    for (int i = 0; i < n * k; i++)
      check(mrd(1, 16'h1A00 + i) == mrd(0, 16'h1A00 + i / k),
            $sformatf("filled padding word %0d", i));
    n_pad_fill++;
  endtask

  // The reorganization of the introductory example: an N x N matrix of 8-bit
  // values, one per word in the first core's memory 0, is copied transposed
  // into memory 3 with four values packed per word. The read channel walks
  // the columns with one entry per row; the write channel packs.
  int n_example = 0;
  task automatic op_example_transpose_pack(int n);
    int cyc;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n * n; i++) mwr(0, 16'h1C00 + i, {24'd0, 8'($urandom)});
    chan(0, 0, DIR_READ, EW32, 0, n, n * n);
    for (int i = 0; i < n; i++) entry(0, i, 16'h1C00 + i * n, 1);
    chan(3, 1, DIR_WRITE, EW8, 7, 1, n * n / 4);
    entry(3, 7, 16'h1C00, 1);
    net(NET_REPLICATE, 0, 12'b0100_0000_0000);
    run(cyc);
    for (int j = 0; j < n; j++)
      for (int i = 0; i < n; i++) begin
        int t;
        t = j * n + i;
        check(8'(mrd(3, 16'h1C00 + t / 4) >> (8 * (t % 4))) == 8'(mrd(0, 16'h1C00 + i * n + j)),
              $sformatf("example: packed transpose (%0d,%0d)", i, j));
      end
    n_example++;
  endtask

  // Splitting and merging of whole elements: a rows x cols array in memory 0
  // is dealt to memories 1..k, gran words per turn (gran = cols: by rows,
  // gran = 1: by columns), then merged back into memory 0 elsewhere.
  int n_split = 0, n_join = 0;
  task automatic op_split_merge(int rows, int cols, int k, int gran);
    int cyc, n;
    logic [11:0] mask;
    n = rows * cols;
    clear_channels();
    set_period(1);
    for (int i = 0; i < n; i++) mwr(0, 16'hE00 + i, $urandom);
    chan(0, 0, DIR_READ, EW32, 0, 1, n);
    entry(0, 0, 16'hE00, 1);
    mask = '0;
    for (int l = 0; l < k; l++) begin
      chan(l + 1, 1, DIR_WRITE, EW32, 1, 1, n / k);
      entry(l + 1, 1, 16'hE00, 1);
      mask[3 * (l + 1) + 1] = 1'b1;
    end
    wreg(12'h005, 32'(gran));
    wreg(12'h002, {4'd0, mask, 8'd0, 4'd0, 1'b0, 1'b1, NET_STRIPE});
    run(cyc);
    for (int l = 0; l < k; l++)
      for (int t = 0; t < n / k; t++)
        check(mrd(l + 1, 16'hE00 + t) == mrd(0, 16'hE00 + ((t / gran) * k + l) * gran + t % gran),
              $sformatf("split k=%0d gran=%0d lane %0d word %0d", k, gran, l, t));
    n_split++;
    // merge back
    clear_channels();
    for (int i = 0; i < n; i++) mwr(0, 16'hF00 + i, 0);
    for (int l = 0; l < k; l++) chan(l + 1, 1, DIR_READ, EW32, 1, 1, n / k);
    chan(0, 2, DIR_WRITE, EW32, 2, 1, n);
    entry(0, 2, 16'hF00, 1);
    wreg(12'h002, {4'd0, mask, 8'd0, 4'd2, 1'b0, 1'b1, NET_MERGE});
    run(cyc);
    for (int i = 0; i < n; i++)
      check(mrd(0, 16'hF00 + i) == mrd(0, 16'hE00 + i), $sformatf("merged back k=%0d gran=%0d word %0d", k, gran, i));
    n_join++;
  endtask

  initial begin
    int cyc;
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // register read-back through the engine
    entry(1, 5, 20'h12345, 20'h00042);
    rreg(mca(1, 8'h8A), v); check(v == 32'h12345, "entry base read-back");
    rreg(mca(1, 8'h8B), v); check(v == 32'h00042, "entry stride read-back");

    op_transpose(16, 8, 1, cyc);
    $display("TP-32 16x8, memory grants every cycle: %0d cycles for 128 words", cyc);
    check(cyc <= 128 + 16, "TP-32 sustains one word per cycle");
    op_transpose(8, 8, 2, cyc);
    $display("TP-32 8x8, memory grants every other cycle: %0d cycles for 64 words", cyc);
    check(cyc <= 2 * 64 + 16 && cyc >= 2 * 64 - 2, "one word per two cycles (2 bytes/cycle)");

    op_merge(4, 64);
    op_merge(2, 32);
    op_stripe(4, 32);
    op_stripe(2, 16);
    op_replicate('{3, 4, 5, 6, 7, 8, 9, 10}, 24, 1);
    op_replicate('{3, 9}, 24, 1);
    op_replicate('{1, 4}, 24, 1);   // one replica in the source memory
    op_pack(1, 32);
    op_pack(0, 8);
    op_inmem_transpose(4, 6);
    op_pad(4, 16);
    op_pad_fill(3, 16);
    op_split_merge(8, 6, 2, 6);   // by rows
    op_split_merge(8, 6, 2, 1);   // by columns
    op_split_merge(6, 8, 3, 8);   // rows over three memories
    op_example_transpose_pack(8);

    $display("mechanisms: stall=%0d backpressure=%0d shared_port=%0d tp=%0d mg=%0d st=%0d rp=%0d pack=%0d unpack=%0d inmem=%0d ew8=%0d ew16=%0d ew32=%0d",
             n_stall, n_backpressure, n_shared, n_tp, n_mg, n_st, n_rp, n_pack, n_unpack, n_inmem,
             n_ew[0], n_ew[1], n_ew[2]);
    check(n_stall > 0, "memory stall happened");
    check(n_backpressure > 0, "network back-pressure happened");
    check(n_shared > 0, "a memory port was shared by read and write channels");
    check(n_tp > 0 && n_mg > 0 && n_st > 0 && n_rp > 0, "every kernel ran");
    check(n_pack > 0 && n_unpack > 0 && n_inmem > 0, "packing, unpacking and in-memory transpose ran");
    check(n_pad > 0 && n_pad_fill > 0 && n_example > 0, "padding and the packed transpose ran");
    check(n_split > 0 && n_join > 0, "splitting and merging of whole elements ran");
    check(n_ew[0] > 0 && n_ew[1] > 0 && n_ew[2] > 0, "every element width used");
    check(g_mem[0].u_mem.bad_addr + g_mem[1].u_mem.bad_addr + g_mem[2].u_mem.bad_addr +
          g_mem[3].u_mem.bad_addr == 0, "every access inside the memories");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
