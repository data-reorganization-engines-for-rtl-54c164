// tb_de_mem_ctrl: self-checking testbench of one memory controller.
//
// The controller is programmed through its register port and attached to a
// behavioural memory with random stalls. The testbench plays the network:
// it loops channel 0's read stream (a 6 x 5 matrix, row by row) back into
// channel 1's write stream, whose five AGU entries start at the five columns
// of the destination, so the memory ends up holding the transpose. Channel 2
// reads every second word as packed bytes (element width 8) and the bytes
// are compared in order. Also checks register read-back, that `all_done` is
// low while work remains and high at the end, and that a second start
// repeats the operation from count zero.
module tb_de_mem_ctrl;
  import de_pkg::*;
  localparam int unsigned NC = 3, NE = 8, AW = 20;
  localparam int ROWS = 6, COLS = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, cfg_rdata;
  logic all_done;
  logic src_valid [NC], src_ready [NC], snk_valid [NC], snk_ready [NC];
  logic [31:0] src_data [NC], snk_data [NC];
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;
  bit consume2;

  de_mem_ctrl #(.NUM_CH(NC), .NUM_ENTRIES(NE), .ADDR_W(AW), .LEN_W(20), .FIFO_DEPTH(8)) dut (.*);
  de_mem_model #(.WORDS(2048), .ADDR_W(AW), .LAT(3)) mem (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // network stand-in: channel 0 -> channel 1, channel 2 -> testbench
  always_comb begin
    snk_valid[1] = src_valid[0];
    snk_data[1]  = src_data[0];
    src_ready[0] = snk_ready[1];
    snk_valid[0] = 0; snk_data[0] = 0;
    snk_valid[2] = 0; snk_data[2] = 0;
    src_ready[1] = 0;
    src_ready[2] = consume2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  logic [7:0] bytes_got [$];
  always @(posedge clk) if (rst_n && src_valid[2] && src_ready[2]) bytes_got.push_back(src_data[2][7:0]);

  initial begin
    ch_cfg_t c0, c1, c2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < ROWS * COLS; i++) mem.mem[16'h040 + i] = $urandom;
    for (int i = 0; i < 20; i++) mem.mem[16'h100 + i] = $urandom;
    c0 = '{num_entries: 4'd1, first_entry: 4'd0, ew: EW32, dir: DIR_READ,  en: 1'b1};
    c1 = '{num_entries: 4'(COLS), first_entry: 4'd1, ew: EW32, dir: DIR_WRITE, en: 1'b1};
    c2 = '{num_entries: 4'd1, first_entry: 4'd7, ew: EW8, dir: DIR_READ,  en: 1'b1};
    wr(8'h00, 32'(c0)); wr(8'h01, ROWS * COLS);
    wr(8'h04, 32'(c1)); wr(8'h05, ROWS * COLS);
    wr(8'h08, 32'(c2)); wr(8'h09, 10);
    wr(8'h80, 16'h040); wr(8'h81, 1);
    for (int j = 0; j < COLS; j++) begin
      wr(8'h80 + 8'(2 * (1 + j)), 16'h400 + j * ROWS);
      wr(8'h81 + 8'(2 * (1 + j)), 1);
    end
    wr(8'h8E, 16'h100); wr(8'h8F, 2);
    @(negedge clk); cfg_addr = 8'h04; #1; check(cfg_rdata == 32'(c1), "CH_CFG read-back");
    cfg_addr = 8'h09; #1; check(cfg_rdata == 10, "CH_LEN read-back");
    cfg_addr = 8'h8F; #1; check(cfg_rdata == 2, "ELEM_SIZE read-back");
    for (int rep = 0; rep < 2; rep++) begin
      bytes_got.delete();
      for (int i = 0; i < ROWS * COLS; i++) mem.mem[16'h400 + i] = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      for (int cyc = 0; cyc < 2000; cyc++) begin
        mem.stall = ($urandom_range(0, 3) == 0);
        consume2  = ($urandom_range(0, 3) == 0);
        @(negedge clk);
        if (all_done) break;
        if (cyc == 5) check(!all_done, "busy while streams run");
      end
      mem.stall = 0;
      check(all_done, "all_done at the end");
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++)
          check(mem.mem[16'h400 + j * ROWS + i] == mem.mem[16'h040 + i * COLS + j],
                $sformatf("transposed (%0d,%0d) run %0d", i, j, rep));
      check(bytes_got.size() == 40, $sformatf("byte count %0d", bytes_got.size()));
      for (int i = 0; i < bytes_got.size(); i++)
        check(bytes_got[i] == 8'(mem.mem[16'h100 + 2 * (i / 4)] >> (8 * (i % 4))), $sformatf("byte %0d", i));
    end
    check(mem.n_waits > 0, "memory stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
