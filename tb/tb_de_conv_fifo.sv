// tb_de_conv_fifo: self-checking testbench of the conversion FIFO.
//
// Read direction: random 32-bit words are pushed from the memory side at
// random times and drained element by element with a random ready; every
// element is compared with the word sliced here (element i = bits
// [i*W +: W]). Write direction: random elements are offered at random times
// and the packed words popped at the memory side are compared with words
// assembled here. Both run for element widths 8, 16 and 32. Also checks that
// the FIFO never accepts more than DEPTH words.
module tb_de_conv_fifo;
  import de_pkg::*;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0, clear = 0;
  dir_e dir = DIR_READ;
  elem_w_e ew = EW32;
  logic mem_push = 0, mem_pop = 0, mem_empty;
  logic [31:0] mem_din = 0, mem_dout;
  logic [3:0] level;
  logic out_valid, out_ready = 0, in_valid = 0, in_ready;
  logic [31:0] out_data, in_data = 0;
  int checks = 0, failures = 0;
  int max_level = 0;

  de_conv_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && int'(level) > max_level) max_level = int'(level);

  function automatic int wbits(elem_w_e e);
    return (e == EW8) ? 8 : (e == EW16) ? 16 : 32;
  endfunction

  task automatic run_read(elem_w_e e, int nwords);
    logic [31:0] words[$];
    int k = 32 / wbits(e);
    int pushed = 0, got = 0;
    logic [31:0] exp;
    dir = DIR_READ; ew = e;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (got < nwords * k) begin
      @(negedge clk);
      mem_push = (pushed < nwords) && (int'(level) < DEPTH) && ($urandom_range(0, 2) != 0);
      mem_din = $urandom;
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid && out_ready) begin
        exp = (words[got / k] >> ((got % k) * wbits(e))) & elem_mask(e);
        checks++;
        if (out_data !== exp) begin
          failures++;
          $display("FAIL read ew=%0d element %0d: got %h expected %h", wbits(e), got, out_data, exp);
        end
        got++;
      end
      if (mem_push) begin words.push_back(mem_din); pushed++; end
    end
    @(negedge clk); mem_push = 0; out_ready = 0;
    checks++;
    if (!mem_empty || out_valid) begin failures++; $display("FAIL read: FIFO not empty at end"); end
  endtask

  task automatic run_write(elem_w_e e, int nwords);
    logic [31:0] elems[$];
    logic [31:0] exp;
    int k = 32 / wbits(e);
    int sent = 0, got = 0;
    dir = DIR_WRITE; ew = e;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    while (got < nwords) begin
      @(negedge clk);
      in_valid = (sent < nwords * k) && ($urandom_range(0, 2) != 0);
      in_data = $urandom;
      mem_pop = !mem_empty && ($urandom_range(0, 3) == 0);
      #1;
      if (mem_pop) begin
        exp = '0;
        for (int i = 0; i < k; i++) exp |= (elems[got * k + i] & elem_mask(e)) << (i * wbits(e));
        checks++;
        if (mem_dout !== exp) begin
          failures++;
          $display("FAIL write ew=%0d word %0d: got %h expected %h", wbits(e), got, mem_dout, exp);
        end
        got++;
      end
      if (in_valid && in_ready) begin elems.push_back(in_data); sent++; end
    end
    @(negedge clk); in_valid = 0; mem_pop = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_read(EW32, 60);
    run_read(EW16, 60);
    run_read(EW8, 60);
    run_write(EW32, 60);
    run_write(EW16, 60);
    run_write(EW8, 60);
    checks++;
    if (max_level > DEPTH || max_level < DEPTH - 1) begin
      failures++;
      $display("FAIL: peak level %0d (expected the FIFO to fill to %0d)", max_level, DEPTH);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
