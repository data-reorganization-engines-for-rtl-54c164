// tb_de_switch_net: self-checking testbench of the switching network.
//
// Applies random valid/ready/data patterns under every network pattern with
// random primary ports and lane sets of 1, 2, 4 (and, for replication, up to
// 8) lanes, and compares every ready, valid and data output and `fire` with
// values computed here: replication copies the primary word to each lane;
// merging puts lane i's low 32/K bits at bit i*32/K of the primary's word;
// striping sends bits [i*32/K +: 32/K] to lane i; a word moves only when all
// ports involved can take part.
module tb_de_switch_net;
  import de_pkg::*;
  localparam int unsigned NP = 12;

  net_mode_e mode;
  logic [3:0] primary;
  logic [NP-1:0] lane_mask;
  logic src_valid [NP], src_ready [NP], snk_valid [NP], snk_ready [NP], fire;
  logic [31:0] src_data [NP], snk_data [NP];
  int checks = 0, failures = 0;
  int fired [4] = '{default: 0};

  logic clk = 0, rst_n = 0, start = 0, deal = 0;
  logic [15:0] gran = 0;

  de_switch_net #(.NP(NP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int lanes [$];
    int k, w, pr;
    bit all_v, all_r, f;
    logic [31:0] word, m;
    for (int t = 0; t < 4000; t++) begin
      mode = net_mode_e'(t % 4);
      pr = $urandom_range(0, NP - 1);
      k = (mode == NET_REPLICATE) ? $urandom_range(1, 8) : (1 << $urandom_range(0, 2));
      lanes.delete();
      lane_mask = '0;
      while (lanes.size() < k) begin
        int p;
        p = $urandom_range(0, NP - 1);
        if (p != pr && !lane_mask[p]) begin lane_mask[p] = 1'b1; lanes.push_back(p); end
      end
      lanes.sort();
      // occasionally also mark the primary in the mask: it must be ignored
      if ($urandom_range(0, 7) == 0) lane_mask[pr] = 1'b1;
      primary = 4'(pr);
      for (int p = 0; p < NP; p++) begin
        src_valid[p] = ($urandom_range(0, 4) != 0);
        snk_ready[p] = ($urandom_range(0, 4) != 0);
        src_data[p]  = $urandom;
      end
      #1;
      w = (k == 4) ? 8 : (k == 2) ? 16 : 32;
      m = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
      all_v = 1; all_r = 1;
      foreach (lanes[i]) begin all_v &= src_valid[lanes[i]]; all_r &= snk_ready[lanes[i]]; end
      case (mode)
        NET_IDLE: begin
          check(!fire, "idle fire");
          for (int p = 0; p < NP; p++) check(!src_ready[p] && !snk_valid[p], "idle quiet");
        end
        NET_REPLICATE, NET_STRIPE: begin
          f = src_valid[pr] && all_r;
          check(fire == f, "fire (replicate/stripe)");
          check(src_ready[pr] == all_r, "primary ready");
          foreach (lanes[i]) begin
            check(snk_valid[lanes[i]] == f, "lane valid");
            word = (mode == NET_STRIPE) ? ((src_data[pr] >> (i * w)) & m) : src_data[pr];
            check(snk_data[lanes[i]] == word, $sformatf("lane data mode %0d lane %0d", mode, i));
          end
          for (int p = 0; p < NP; p++)
            if (!(p inside {lanes})) check(!snk_valid[p], "non-lane sink quiet");
        end
        NET_MERGE: begin
          f = all_v && snk_ready[pr];
          check(fire == f, "fire (merge)");
          check(snk_valid[pr] == all_v, "merge valid");
          word = '0;
          foreach (lanes[i]) word |= (src_data[lanes[i]] & m) << (i * w);
          check(snk_data[pr] == word, $sformatf("merged word k=%0d", k));
          foreach (lanes[i]) check(src_ready[lanes[i]] == f, "lane ready");
          for (int p = 0; p < NP; p++)
            if (p != pr) check(!snk_valid[p], "merge other sinks quiet");
        end
      endcase
      if (fire) fired[mode]++;
    end
    check(fired[1] > 0 && fired[2] > 0 && fired[3] > 0, "every pattern moved data");

    // ---- deal mode (clocked) ----
    fired = '{default: 0};
    rst_n = 1; deal = 1;
    for (int run = 0; run < 40; run++) begin
      int cur, gc, moved, g;
      mode = (run % 2) ? NET_MERGE : NET_STRIPE;
      pr = $urandom_range(0, NP - 1);
      k = $urandom_range(1, 5);
      g = $urandom_range(0, 4);
      gran = 16'(g);
      lanes.delete();
      lane_mask = '0;
      while (lanes.size() < k) begin
        int p;
        p = $urandom_range(0, NP - 1);
        if (p != pr && !lane_mask[p]) begin lane_mask[p] = 1'b1; lanes.push_back(p); end
      end
      lanes.sort();
      primary = 4'(pr);
      start = 1; #1; clk = 1; #1; clk = 0; start = 0;
      cur = 0; gc = 0; moved = 0;
      for (int t = 0; t < 60; t++) begin
        bit ef;
        for (int p = 0; p < NP; p++) begin
          src_valid[p] = ($urandom_range(0, 3) != 0);
          snk_ready[p] = ($urandom_range(0, 3) != 0);
          src_data[p]  = $urandom;
        end
        #1;
        if (mode == NET_STRIPE) begin
          ef = src_valid[pr] && snk_ready[lanes[cur]];
          check(fire == ef, "deal stripe fire");
          check(src_ready[pr] == snk_ready[lanes[cur]], "deal stripe ready");
          foreach (lanes[i]) begin
            check(snk_valid[lanes[i]] == (ef && i == cur), "deal stripe lane valid");
            if (i == cur) check(snk_data[lanes[i]] == src_data[pr], "deal stripe data");
          end
        end else begin
          ef = src_valid[lanes[cur]] && snk_ready[pr];
          check(fire == ef, "deal merge fire");
          check(snk_valid[pr] == src_valid[lanes[cur]], "deal merge valid");
          check(snk_data[pr] == src_data[lanes[cur]], "deal merge data");
          foreach (lanes[i]) check(src_ready[lanes[i]] == (i == cur && snk_ready[pr]), "deal merge lane ready");
        end
        clk = 1; #1; clk = 0;
        if (ef) begin
          moved++;
          gc++;
          if (gc >= ((g == 0) ? 1 : g)) begin gc = 0; cur = (cur + 1) % k; end
        end
      end
      if (moved > 0) fired[mode]++;
    end
    check(fired[2] >= 15 && fired[3] >= 15, "deal runs moved data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
