// de_mem_model: behavioural model of one memory module for the testbenches.
//
// Not synthesizable logic of the engine: it stands in for an external memory
// and its bus interface. WORDS 32-bit words in an array `mem` that the
// testbench fills and inspects directly. An access is taken in a cycle where
// mem_req and mem_gnt are high. mem_gnt is high in one cycle out of
// `gnt_period` (1 = every cycle), or never while `stall` is set, modelling a
// slower or contended memory bus. Reads return in order LAT cycles after they
// are taken. Counters record reads, writes and cycles a request waited.
module de_mem_model #(
  parameter int unsigned WORDS  = 4096,
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned LAT    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mem_req,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [31:0]       mem_wdata,
  output logic              mem_gnt,
  output logic              mem_rvalid,
  output logic [31:0]       mem_rdata
);

  logic [31:0] mem [WORDS];
  int unsigned gnt_period = 1;
  logic        stall      = 1'b0;
  int unsigned phase      = 0;
  int unsigned n_reads    = 0;
  int unsigned n_writes   = 0;
  int unsigned n_waits    = 0;
  int unsigned bad_addr   = 0;

  logic        pv [LAT];
  logic [31:0] pd [LAT];

  assign mem_gnt    = !stall && (phase == 0);
  assign mem_rvalid = pv[LAT-1];
  assign mem_rdata  = pd[LAT-1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 0;
      for (int i = 0; i < LAT; i++) begin
        pv[i] <= 1'b0;
        pd[i] <= '0;
      end
    end else begin
      phase <= (phase + 1 >= gnt_period) ? 0 : phase + 1;
      for (int i = LAT - 1; i > 0; i--) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
      end
      pv[0] <= 1'b0;
      pd[0] <= '0;
      if (mem_req && !mem_gnt) n_waits <= n_waits + 1;
      if (mem_req && mem_gnt) begin
        if (int'(mem_addr) >= WORDS) bad_addr <= bad_addr + 1;
        if (mem_we) begin
          mem[mem_addr % WORDS] <= mem_wdata;
          n_writes <= n_writes + 1;
        end else begin
          pv[0] <= 1'b1;
          pd[0] <= mem[mem_addr % WORDS];
          n_reads <= n_reads + 1;
        end
      end
    end
  end

endmodule
