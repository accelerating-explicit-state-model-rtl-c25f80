// tb_phast_top: end-to-end test of the PHAST verifier on the DOWN model.
//
// Two verifiers run side by side, each with its own SDRAM bank models, at
// reduced sizes (32 K-entry hash table so that collisions happen, 16-entry
// unvisited-queue buffers so that the queue spills to SDRAM):
//   dut_a  default behaviour: must stop on the all-zero state.
//   dut_b  STOP_ON_VIOLATION = 0: must explore the whole state space and
//          raise done; its set of unique states must equal the reachable set.
// The reachable set is computed here by a breadth-first search written
// independently of the RTL. Every state entering either unvisited queue must
// be reachable and must enter only once. The test also counts how often
// each mechanism fired (CAM hit, table duplicate, collision and
// reintroduction, queue spill and fill, disabled rule, lookup drain phase,
// violation, stop, done) and fails on any that never did.
module tb_phast_top;
  import phast_pkg::*;

  localparam int unsigned HT_ADDR_W = 15;
  localparam int unsigned HASH_W    = 40;
  localparam int unsigned ENTRY_W   = HASH_W - HT_ADDR_W + 1;
  localparam int unsigned UQ_ADDR_W = 14;
  localparam int unsigned SW        = 18;
  localparam int unsigned WATCHDOG  = 1_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference state space ----------------
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

  // ---------------- two verifiers ----------------
  logic stop_a, done_a, stop_b, done_b;
  logic [SW-1:0] bad_a, bad_b;
  phast_stats_t st_a, st_b;

  logic ht_rv_a, ht_rr_a, ht_we_a, ht_sv_a;
  logic [HT_ADDR_W-1:0] ht_ad_a;
  logic [ENTRY_W-1:0] ht_wd_a, ht_sd_a;
  logic uq_rv_a, uq_rr_a, uq_we_a, uq_sv_a;
  logic [UQ_ADDR_W-1:0] uq_ad_a;
  logic [SW-1:0] uq_wd_a, uq_sd_a;

  logic ht_rv_b, ht_rr_b, ht_we_b, ht_sv_b;
  logic [HT_ADDR_W-1:0] ht_ad_b;
  logic [ENTRY_W-1:0] ht_wd_b, ht_sd_b;
  logic uq_rv_b, uq_rr_b, uq_we_b, uq_sv_b;
  logic [UQ_ADDR_W-1:0] uq_ad_b;
  logic [SW-1:0] uq_wd_b, uq_sd_b;

  phast_top #(.HT_ADDR_W(HT_ADDR_W), .UQ_BUF_DEPTH(16), .UQ_ADDR_W(UQ_ADDR_W)) dut_a (
    .clk, .rst_n, .start, .stop(stop_a), .bad_state(bad_a), .done(done_a), .stats(st_a),
    .ht_req_valid(ht_rv_a), .ht_req_ready(ht_rr_a), .ht_req_we(ht_we_a),
    .ht_req_addr(ht_ad_a), .ht_req_wdata(ht_wd_a), .ht_rsp_valid(ht_sv_a), .ht_rsp_rdata(ht_sd_a),
    .uq_req_valid(uq_rv_a), .uq_req_ready(uq_rr_a), .uq_req_we(uq_we_a),
    .uq_req_addr(uq_ad_a), .uq_req_wdata(uq_wd_a), .uq_rsp_valid(uq_sv_a), .uq_rsp_rdata(uq_sd_a));

  phast_top #(.HT_ADDR_W(HT_ADDR_W), .UQ_BUF_DEPTH(16), .UQ_ADDR_W(UQ_ADDR_W),
              .STOP_ON_VIOLATION(1'b0)) dut_b (
    .clk, .rst_n, .start, .stop(stop_b), .bad_state(bad_b), .done(done_b), .stats(st_b),
    .ht_req_valid(ht_rv_b), .ht_req_ready(ht_rr_b), .ht_req_we(ht_we_b),
    .ht_req_addr(ht_ad_b), .ht_req_wdata(ht_wd_b), .ht_rsp_valid(ht_sv_b), .ht_rsp_rdata(ht_sd_b),
    .uq_req_valid(uq_rv_b), .uq_req_ready(uq_rr_b), .uq_req_we(uq_we_b),
    .uq_req_addr(uq_ad_b), .uq_req_wdata(uq_wd_b), .uq_rsp_valid(uq_sv_b), .uq_rsp_rdata(uq_sd_b));

  sdram_model #(.ADDR_W(HT_ADDR_W), .DATA_W(ENTRY_W)) ht_a (
    .clk, .rst_n, .req_valid(ht_rv_a), .req_ready(ht_rr_a), .req_we(ht_we_a),
    .req_addr(ht_ad_a), .req_wdata(ht_wd_a), .rsp_valid(ht_sv_a), .rsp_rdata(ht_sd_a));
  sdram_model #(.ADDR_W(UQ_ADDR_W), .DATA_W(SW)) uqm_a (
    .clk, .rst_n, .req_valid(uq_rv_a), .req_ready(uq_rr_a), .req_we(uq_we_a),
    .req_addr(uq_ad_a), .req_wdata(uq_wd_a), .rsp_valid(uq_sv_a), .rsp_rdata(uq_sd_a));
  sdram_model #(.ADDR_W(HT_ADDR_W), .DATA_W(ENTRY_W), .READY_PCT(60)) ht_b (
    .clk, .rst_n, .req_valid(ht_rv_b), .req_ready(ht_rr_b), .req_we(ht_we_b),
    .req_addr(ht_ad_b), .req_wdata(ht_wd_b), .rsp_valid(ht_sv_b), .rsp_rdata(ht_sd_b));
  sdram_model #(.ADDR_W(UQ_ADDR_W), .DATA_W(SW), .READY_PCT(60)) uqm_b (
    .clk, .rst_n, .req_valid(uq_rv_b), .req_ready(uq_rr_b), .req_we(uq_we_b),
    .req_addr(uq_ad_b), .req_wdata(uq_wd_b), .rsp_valid(uq_sv_b), .rsp_rdata(uq_sd_b));

  // ---------------- monitors ----------------
  int unsigned seen_a [logic [SW-1:0]];
  int unsigned seen_b [logic [SW-1:0]];
  int bad_push_a = 0, bad_push_b = 0, dup_push_a = 0, dup_push_b = 0, bad_gen = 0;
  int n_same = 0, n_reintro = 0, n_drain = 0, n_gen_after_stop = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut_a.uq_push && dut_a.uq_push_ready) begin
      if (!reach.exists(dut_a.uq_push_state)) bad_push_a++;
      if (seen_a.exists(dut_a.uq_push_state)) dup_push_a++;
      seen_a[dut_a.uq_push_state] = 1;
    end
    if (dut_b.uq_push && dut_b.uq_push_ready) begin
      if (!reach.exists(dut_b.uq_push_state)) bad_push_b++;
      if (seen_b.exists(dut_b.uq_push_state)) dup_push_b++;
      seen_b[dut_b.uq_push_state] = 1;
    end
    if (dut_b.nsg_valid && dut_b.nsg_ready && !reach.exists(dut_b.nsg_state)) bad_gen++;
    if (dut_a.u_nsg.ev_same || dut_b.u_nsg.ev_same) n_same++;
    if (dut_a.u_enq.cq_pop || dut_b.u_enq.cq_pop) n_reintro++;
    if (dut_b.u_htl.drain && !$past(dut_b.u_htl.drain)) n_drain++;
    if (stop_a && dut_a.nsg_valid) n_gen_after_stop++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mech(int unsigned n, string what);
    $display("  mechanism %-28s %0d", what, n);
    check(n > 0, {"mechanism never happened: ", what});
  endtask

  initial begin
    build_reference();
    $display("reference: %0d reachable states", reach.num());
    check(reach.num() == 10962, "reference state count");
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    start = 1'b1;
    @(posedge clk);
    start = 1'b0;
    wait (stop_a && done_b);
    repeat (50) @(posedge clk);

    $display("dut_a: stop=%0d gen=%0d uniq=%0d camhit=%0d tdup=%0d coll=%0d cycles=%0d",
             stop_a, st_a.generated, st_a.uniques, st_a.cam_hits, st_a.table_dups,
             st_a.collisions, st_a.cycles);
    $display("dut_b: done=%0d gen=%0d uniq=%0d camhit=%0d tdup=%0d coll=%0d spill=%0d fill=%0d viol=%0d cycles=%0d",
             done_b, st_b.generated, st_b.uniques, st_b.cam_hits, st_b.table_dups,
             st_b.collisions, st_b.uq_spills, st_b.uq_fills, st_b.violations, st_b.cycles);

    check(stop_a, "dut_a stops");
    check(bad_a == '0, "dut_a counterexample is the all-zero state");
    check(!done_a, "dut_a not done after a violation");
    check(n_gen_after_stop == 0, "dut_a generates nothing after stop");
    check(bad_push_a == 0, "dut_a unvisited states are reachable");
    check(dup_push_a == 0, "dut_a no state enters the unvisited queue twice");
    check(st_a.uniques == seen_a.num(), "dut_a unique count matches monitor");
    check(st_a.uniques > 10000, "dut_a explored nearly all states before the violation");

    check(done_b, "dut_b done");
    check(st_b.uniques == 10962, "dut_b explores exactly the reachable states");
    check(seen_b.num() == 10962, "dut_b monitor saw every reachable state");
    check(bad_push_b == 0 && bad_gen == 0, "dut_b only reachable states");
    check(dup_push_b == 0, "dut_b no state enters the unvisited queue twice");
    check(st_b.generated == st_b.uniques + st_b.cam_hits + st_b.table_dups,
          "dut_b every generated state is unique or duplicate");
    check(st_b.violations >= 1, "dut_b saw the violating state");
    check(st_b.uq_spills == st_b.uq_fills, "dut_b every spilled state read back");

    mech(st_a.cam_hits + st_b.cam_hits, "CAM hit");
    mech(st_a.table_dups + st_b.table_dups, "hash table duplicate");
    mech(st_a.collisions + st_b.collisions, "collision");
    mech(n_reintro, "collision reintroduced");
    mech(st_b.uq_spills, "unvisited queue spill");
    mech(st_b.uq_fills, "unvisited queue fill");
    mech(n_same, "disabled rule (same bit)");
    mech(n_drain, "lookup drain phase");
    mech(st_b.violations, "violation");
    mech(32'(stop_a), "stop");
    mech(32'(done_b), "done");

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
