// tb_de_chan_ctrl: self-checking testbench of the channel controller.
//
// Three channels share one memory model: channel 0 reads 20 words through AGU
// entry 0, channel 1 writes 15 words cycling over entries 1, 2, 3, channel 2
// reads 10 words through entry 4 with a slow consumer. The FIFOs and the AGU
// are modelled here (AGU address = entry * 0x100 + accesses of that entry),
// and the memory grants at random. Checks: each channel makes exactly its
// number of accesses, with the expected entry sequence; write data is the
// head of the writing channel's FIFO; every returned read word lands in the
// FIFO of the channel that asked for it, in order; a read FIFO never
// overflows (read credit); `all_done` stays low until all streams finish and
// then rises.
module tb_de_chan_ctrl;
  import de_pkg::*;
  localparam int unsigned NC = 3, NE = 8, AW = 20, LW = 20, D = 8;

  logic clk = 0, rst_n = 0, start = 0;
  ch_cfg_t cfg [NC];
  logic [LW-1:0] len [NC];
  logic [3:0] fifo_level [NC];
  logic fifo_empty [NC];
  logic [31:0] fifo_dout [NC];
  logic fifo_push [NC], fifo_pop [NC];
  logic [2:0] agu_sel;
  logic agu_advance;
  logic [AW-1:0] agu_addr;
  logic mem_req, mem_we, mem_gnt, mem_rvalid, all_done;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;

  int checks = 0, failures = 0;
  logic [31:0] q [NC][$];
  int unsigned agu_cnt [NE];
  int unsigned acc [NC];
  int unsigned rd_got [NC];
  int unsigned wr_made = 0;

  de_chan_ctrl #(.NUM_CH(NC), .NUM_ENTRIES(NE), .ADDR_W(AW), .LEN_W(LW), .FIFO_DEPTH(D)) dut (.*);
  de_mem_model #(.WORDS(4096), .ADDR_W(AW), .LAT(3)) mem (
    .clk, .rst_n, .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      fifo_level[c] = 4'(q[c].size());
      fifo_empty[c] = (q[c].size() == 0);
      fifo_dout[c]  = (q[c].size() != 0) ? q[c][0] : '0;
    end
    agu_addr = AW'(agu_sel * 32'h100 + agu_cnt[agu_sel]);
  end

  function automatic int unsigned exp_entry(int c, int unsigned n);
    return (c == 1) ? 1 + (n % 3) : (c == 0) ? 0 : 4;
  endfunction

  int unsigned wr_next = 0;
  bit adv_pend = 0;
  int adv_sel = 0;
  bit push_pend [NC] = '{default: 0};
  bit pop_pend [NC] = '{default: 0};
  logic [31:0] push_val [NC];
  initial begin
    for (int c = 0; c < NC; c++) begin cfg[c] = '0; len[c] = '0; end
    for (int e = 0; e < NE; e++) agu_cnt[e] = 0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 32'hA000_0000 | i;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg[0] = '{num_entries: 4'd1, first_entry: 4'd0, ew: EW32, dir: DIR_READ,  en: 1'b1};
    cfg[1] = '{num_entries: 4'd3, first_entry: 4'd1, ew: EW32, dir: DIR_WRITE, en: 1'b1};
    cfg[2] = '{num_entries: 4'd1, first_entry: 4'd4, ew: EW32, dir: DIR_READ,  en: 1'b1};
    len[0] = 20; len[1] = 15; len[2] = 10;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // drive: memory stalls, write data arrives, consumers drain
      mem.stall = ($urandom_range(0, 3) == 0);
      if (wr_next < 15 && q[1].size() < D && $urandom_range(0, 1) == 1) begin
        q[1].push_back(32'h5000_0000 | wr_next);
        wr_next++;
      end
      if (q[0].size() != 0 && $urandom_range(0, 2) != 0) void'(q[0].pop_front());
      if (q[2].size() != 0 && $urandom_range(0, 5) == 0) void'(q[2].pop_front());
      #1;
      if (mem_req && mem_gnt) begin
        int c;
        check(q[int'(agu_sel) == 0 ? 0 : int'(agu_sel) == 4 ? 2 : 1].size() <= D, "model sanity");
        c = (int'(agu_sel) == 0) ? 0 : (int'(agu_sel) == 4) ? 2 : 1;
        check(agu_advance, "advance on taken access");
        check(int'(agu_sel) == int'(exp_entry(c, acc[c])), $sformatf("entry sequence ch%0d", c));
        check(mem_we == (c == 1), "direction");
        if (c == 1) begin
          check(mem_wdata == (32'h5000_0000 | wr_made), "write data order");
          check(mem_addr == AW'(agu_sel * 32'h100 + agu_cnt[agu_sel]), "write address");
          wr_made++;
        end
        acc[c]++;
        adv_pend = 1; adv_sel = int'(agu_sel);
      end else begin
        check(!agu_advance, "no advance without access");
      end
      for (int c = 0; c < NC; c++) begin
        if (fifo_push[c]) begin
          int unsigned ent;
          ent = (c == 0) ? 0 : 4;
          check(c != 1, "no read data to write channel");
          check(mem_rdata == (32'hA000_0000 | (ent * 32'h100 + rd_got[c])), $sformatf("read data ch%0d got %h n=%0d", c, mem_rdata, rd_got[c]));
          check(q[c].size() < D, "read FIFO overflow");
          push_pend[c] = 1; push_val[c] = mem_rdata;
          rd_got[c]++;
        end
        if (fifo_pop[c]) begin
          check(c == 1, "pop only for write channel");
          pop_pend[c] = 1;
        end
      end
      @(posedge clk); #1;
      if (adv_pend) agu_cnt[adv_sel]++;
      adv_pend = 0;
      for (int c = 0; c < NC; c++) begin
        if (push_pend[c]) q[c].push_back(push_val[c]);
        if (pop_pend[c]) void'(q[c].pop_front());
        push_pend[c] = 0; pop_pend[c] = 0;
      end
      if (rd_got[0] == 20 && rd_got[2] == 10 && wr_made == 15 && q[0].size() == 0 && q[2].size() == 0) begin
        @(negedge clk); #1;
        check(all_done, "all_done after completion");
        break;
      end
      check(!all_done, "all_done early");
      @(negedge clk);
    end
    check(acc[0] == 20 && acc[1] == 15 && acc[2] == 10, $sformatf("access counts %0d %0d %0d", acc[0], acc[1], acc[2]));
    check(mem.n_waits > 0, "memory stalls were exercised");
    for (int e = 1; e <= 3; e++) check(agu_cnt[e] == 5, "entry use count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
