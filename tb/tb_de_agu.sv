// tb_de_agu: self-checking testbench of the address generation unit.
//
// Programs every entry with a random base and stride, then makes random
// accesses on random entries and compares each address with
// base + count * elem_size computed here from a separate access count per
// entry. Checks register read-back, that `clear` restarts every count, and
// that an entry not selected does not move.
module tb_de_agu;
  localparam int unsigned N  = 8;
  localparam int unsigned AW = 20;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_is_esz = 0, clear = 0, advance = 0;
  logic [2:0] wr_entry = 0, rd_entry = 0, sel = 0;
  logic [AW-1:0] wr_data = 0, rd_base, rd_esz, addr, count;
  int checks = 0, failures = 0;
  logic [AW-1:0] base [N], esz [N];
  int unsigned cnt [N];

  de_agu #(.NUM_ENTRIES(N), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [AW-1:0] got, input logic [AW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int e = 0; e < N; e++) begin
      base[e] = AW'($urandom);
      esz[e]  = AW'($urandom_range(0, 300));
      cnt[e]  = 0;
      @(negedge clk); wr_en = 1; wr_entry = 3'(e); wr_is_esz = 0; wr_data = base[e];
      @(negedge clk); wr_is_esz = 1; wr_data = esz[e];
    end
    @(negedge clk); wr_en = 0;
    for (int e = 0; e < N; e++) begin
      rd_entry = 3'(e); #1;
      check(rd_base, base[e], "base read-back");
      check(rd_esz, esz[e], "esz read-back");
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int round = 0; round < 2; round++) begin
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        sel = 3'($urandom_range(0, N - 1));
        advance = ($urandom_range(0, 3) != 0);
        #1;
        check(addr, AW'(base[sel] + cnt[sel] * esz[sel]), "address");
        check(count, AW'(cnt[sel]), "count");
        if (advance) cnt[sel]++;
      end
      @(negedge clk); advance = 0; clear = 1;
      @(negedge clk); clear = 0;
      for (int e = 0; e < N; e++) cnt[e] = 0;
      for (int e = 0; e < N; e++) begin
        sel = 3'(e); #1;
        check(addr, base[e], "address after clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
