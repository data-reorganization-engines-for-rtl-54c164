// de_agu: address generation unit of one memory controller.
//
// Holds NUM_ENTRIES affine stream descriptors. Entry n is the tuple
// <base, elem_size> plus a running count; the address it produces is
// base + count * elem_size, and count starts at zero and steps by one on every
// memory access that uses the entry. The memory operations read(n) and
// write(n) choose the entry through `sel`. This follows the original design. Instead
// of a multiplier each entry keeps the running product count*elem_size in an
// offset register that grows by elem_size per access, which gives the same
// address; that, the register write/read ports and the widths are this
// design's choices.
//
// Interface: `wr_*` programs base or elem_size of one entry; `rd_*` reads them
// back combinationally. `clear` (start of an operation) zeroes every count.
// `addr` is combinational from `sel`; `advance` in a cycle steps entry `sel`
// at the next clock edge, so back-to-back accesses get consecutive addresses.
module de_agu #(
  parameter int unsigned NUM_ENTRIES = 8,
  parameter int unsigned ADDR_W      = 20,
  localparam int unsigned SEL_W      = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // programming
  input  logic              wr_en,
  input  logic [SEL_W-1:0]  wr_entry,
  input  logic              wr_is_esz,   // 0: base, 1: elem_size
  input  logic [ADDR_W-1:0] wr_data,
  input  logic [SEL_W-1:0]  rd_entry,
  output logic [ADDR_W-1:0] rd_base,
  output logic [ADDR_W-1:0] rd_esz,
  // stream operation
  input  logic              clear,
  input  logic [SEL_W-1:0]  sel,
  input  logic              advance,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] count       // accesses made so far by entry sel
);

  logic [ADDR_W-1:0] base_q [NUM_ENTRIES];
  logic [ADDR_W-1:0] esz_q  [NUM_ENTRIES];
  logic [ADDR_W-1:0] off_q  [NUM_ENTRIES];  // count * elem_size
  logic [ADDR_W-1:0] cnt_q  [NUM_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ENTRIES; i++) begin
        base_q[i] <= '0;
        esz_q[i]  <= '0;
      end
    end else if (wr_en) begin
      if (wr_is_esz) esz_q[wr_entry]  <= wr_data;
      else           base_q[wr_entry] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ENTRIES; i++) begin
        off_q[i] <= '0;
        cnt_q[i] <= '0;
      end
    end else if (clear) begin
      for (int i = 0; i < NUM_ENTRIES; i++) begin
        off_q[i] <= '0;
        cnt_q[i] <= '0;
      end
    end else if (advance) begin
      off_q[sel] <= off_q[sel] + esz_q[sel];
      cnt_q[sel] <= cnt_q[sel] + 1'b1;
    end
  end

  assign addr    = base_q[sel] + off_q[sel];
  assign count   = cnt_q[sel];
  assign rd_base = base_q[rd_entry];
  assign rd_esz  = esz_q[rd_entry];

endmodule
