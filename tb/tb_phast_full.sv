// tb_phast_full: one complete verification of the DOWN model by phast_top
// at its default sizes (40-bit hash, 2**25-entry hash table, 512-entry
// unvisited-queue buffers, 2**16-word unvisited queue in SDRAM).
//
// Expected outcome: the search stops on the all-zero state, which breaks
// the safety property. Checked: stop and its counterexample, every state
// entering the unvisited queue is reachable and enters once, the number of
// unique states is consistent with the monitor, and nearly all of the
// 10,962 reachable states were found first (breadth-first order puts the
// all-zero state last). With the full-size table the DOWN states are
// expected to cause no collisions; the count is printed.
module tb_phast_full;
  import phast_pkg::*;

  localparam int unsigned SW       = 18;
  localparam int unsigned WATCHDOG = 2_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // independent reference: breadth-first search of DOWN
  int unsigned reach [logic [SW-1:0]];

  function automatic logic [SW-1:0] ref_rule(logic [SW-1:0] s, int r, output bit en);
    int c [6];
    logic [SW-1:0] n;
    for (int i = 0; i < 6; i++) c[i] = int'(s[3*i +: 3]);
    en = (c[r] > 0);
    if (en) begin
      c[r]--;
      if (r < 4 && c[r+1] > 0) c[r+1]--;
    end
    for (int i = 0; i < 6; i++) n[3*i +: 3] = 3'(c[i]);
    return n;
  endfunction

  task automatic build_reference();
    logic [SW-1:0] q [$];
    logic [SW-1:0] s, n;
    bit en;
    s = {6{3'd5}};
    reach[s] = 0;
    q.push_back(s);
    while (q.size() > 0) begin
      s = q.pop_front();
      for (int r = 0; r < 6; r++) begin
        n = ref_rule(s, r, en);
        if (en && !reach.exists(n)) begin
          reach[n] = reach[s] + 1;
          q.push_back(n);
        end
      end
    end
  endtask

  logic stop, done;
  logic [SW-1:0] bad_state;
  phast_stats_t stats;
  logic ht_rv, ht_rr, ht_we, ht_sv;
  logic [24:0] ht_ad;
  logic [15:0] ht_wd, ht_sd;
  logic uq_rv, uq_rr, uq_we, uq_sv;
  logic [15:0] uq_ad;
  logic [SW-1:0] uq_wd, uq_sd;

  phast_top dut (
    .clk, .rst_n, .start, .stop, .bad_state, .done, .stats,
    .ht_req_valid(ht_rv), .ht_req_ready(ht_rr), .ht_req_we(ht_we),
    .ht_req_addr(ht_ad), .ht_req_wdata(ht_wd), .ht_rsp_valid(ht_sv), .ht_rsp_rdata(ht_sd),
    .uq_req_valid(uq_rv), .uq_req_ready(uq_rr), .uq_req_we(uq_we),
    .uq_req_addr(uq_ad), .uq_req_wdata(uq_wd), .uq_rsp_valid(uq_sv), .uq_rsp_rdata(uq_sd));

  sdram_model #(.ADDR_W(25), .DATA_W(16)) ht_mem (
    .clk, .rst_n, .req_valid(ht_rv), .req_ready(ht_rr), .req_we(ht_we),
    .req_addr(ht_ad), .req_wdata(ht_wd), .rsp_valid(ht_sv), .rsp_rdata(ht_sd));
  sdram_model #(.ADDR_W(16), .DATA_W(SW)) uq_mem (
    .clk, .rst_n, .req_valid(uq_rv), .req_ready(uq_rr), .req_we(uq_we),
    .req_addr(uq_ad), .req_wdata(uq_wd), .rsp_valid(uq_sv), .rsp_rdata(uq_sd));

  int unsigned seen [logic [SW-1:0]];
  int bad_push = 0, dup_push = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.uq_push && dut.uq_push_ready) begin
      if (!reach.exists(dut.uq_push_state)) bad_push++;
      if (seen.exists(dut.uq_push_state)) dup_push++;
      seen[dut.uq_push_state] = 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    build_reference();
    check(reach.num() == 10962, "reference state count");
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    wait (stop || done);
    // let the states already in the lookup pipeline retire
    repeat (2000) @(posedge clk);
    $display("stop=%0d done=%0d generated=%0d unique=%0d cam_hits=%0d reads=%0d table_dups=%0d collisions=%0d spills=%0d cycles=%0d",
             stop, done, stats.generated, stats.uniques, stats.cam_hits, stats.table_reads,
             stats.table_dups, stats.collisions, stats.uq_spills, stats.cycles);
    check(stop, "violation found");
    check(!done, "not reported as verified");
    check(bad_state == '0, "counterexample is the all-zero state");
    check(bad_push == 0, "only reachable states enter the unvisited queue");
    check(dup_push == 0, "no state enters the unvisited queue twice");
    check(stats.uniques == seen.num(), "unique count matches monitor");
    check(stats.uniques > 10900, "nearly all states found before the violation");
    check(stats.table_reads == stats.uniques + stats.table_dups + stats.collisions,
          "every table read resolved once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
