// tb_hash_table_lookup: streams hash values into the lookup with a 64-entry
// table (ADDR_W = 6) in an SDRAM model, and checks every verdict against a
// reference table kept here. The stream is built so that the right verdict
// is known in advance: a fresh hash is unique if its address is free in the
// reference and a collision otherwise; a repeat is only ever of a hash that
// is stored, and is a duplicate whether the CAM or the table catches it.
// Repeats of recent hashes exercise the CAM, repeats of old ones the table,
// and stored hashes with one tag bit flipped test the full tag compare.
// Also checked: verdicts in arrival order, the shifted state (rotated left
// by one) and round (+1) of each collision, that every table write stores
// {1, tag} of a unique hash, that no read is issued while a read result is
// waiting (end of the read phase), and that all three verdicts and both
// duplicate sources occur.
module tb_hash_table_lookup;
  import phast_pkg::*;
  localparam int unsigned STATE_W = 18, HASH_W = 40, ADDR_W = 6;
  localparam int unsigned TAG_W = HASH_W - ADDR_W, ENTRY_W = TAG_W + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic hv_valid, hv_ready;
  logic [HASH_W-1:0] hv_hash;
  logic [STATE_W-1:0] hv_state;
  logic [REHASH_W-1:0] hv_round;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [ENTRY_W-1:0] mem_req_wdata, mem_rsp_rdata;
  logic res_valid, res_ready, sq_valid, sq_ready;
  lookup_e res_kind;
  logic [STATE_W-1:0] sq_state;
  logic [REHASH_W-1:0] sq_round;
  logic ev_cam_hit, ev_read, ev_unique, ev_table_dup, ev_collision;

  hash_table_lookup #(.STATE_W(STATE_W), .HASH_W(HASH_W), .ADDR_W(ADDR_W)) dut (.*);

  sdram_model #(.ADDR_W(ADDR_W), .DATA_W(ENTRY_W), .MIN_LAT(6), .MAX_LAT(20)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { lookup_e k; logic [STATE_W-1:0] s; logic [REHASH_W-1:0] r; } exp_t;
  exp_t exp_q [$];
  logic [HASH_W-1:0] ref_tab [int];      // address -> stored hash
  logic [HASH_W-1:0] stored [$];         // stored hashes, in order
  bit                near [logic [HASH_W-1:0]]; // near-miss hashes sent
  logic [HASH_W-1:0] uniq_w [logic [ADDR_W-1:0]]; // writes expected per address
  int n_res = 0, n_cam = 0, n_tdup = 0, n_coll = 0, n_uniq = 0, n_bad_rd = 0;

  function automatic exp_t classify(logic [HASH_W-1:0] h, logic [STATE_W-1:0] s,
                                    logic [REHASH_W-1:0] r);
    exp_t e;
    int a;
    a = int'(h[ADDR_W-1:0]);
    e.s = s; e.r = r;
    if (ref_tab.exists(a) && ref_tab[a] == h) e.k = LK_DUPLICATE;
    else if (ref_tab.exists(a)) e.k = LK_COLLISION;
    else begin
      e.k = LK_UNIQUE;
      ref_tab[a] = h;
      stored.push_back(h);
    end
    return e;
  endfunction

  // result side: random back-pressure, compare in order
  always @(posedge clk) if (rst_n) begin
    if (res_valid && res_ready) begin
      n_res++;
      check(exp_q.size() > 0, "verdict expected");
      if (exp_q.size() > 0) begin
        check(res_kind == exp_q[0].k, "verdict");
        if (res_kind == LK_COLLISION) begin
          check(sq_valid, "shifted state pushed with collision verdict");
          check(sq_state == {exp_q[0].s[STATE_W-2:0], exp_q[0].s[STATE_W-1]}, "shifted state");
          check(sq_round == exp_q[0].r + 1'b1, "rehash round");
        end else begin
          check(!sq_valid, "no shifted state without collision");
        end
        void'(exp_q.pop_front());
      end
    end
    if (mem_req_valid && mem_req_ready && mem_req_we)
      check(mem_req_wdata == {1'b1, ref_tab[int'(mem_req_addr)][HASH_W-1:ADDR_W]}, "table write");
    if (mem_req_valid && !mem_req_we && (mem_rsp_valid || dut.rq_valid)) n_bad_rd++;
    if (ev_cam_hit) n_cam++;
    if (ev_table_dup) n_tdup++;
    if (ev_collision) n_coll++;
    if (ev_unique) n_uniq++;
  end
  always @(negedge clk) begin
    res_ready <= ($urandom % 100) < 80;
    sq_ready  <= ($urandom % 100) < 90;
  end

  int sent = 0;
  initial begin
    hv_valid = 0; hv_hash = '0; hv_state = '0; hv_round = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    while (sent < 1500) begin
      int pick;
      logic [HASH_W-1:0] h;
      exp_t e;
      pick = $urandom % 100;
      if (stored.size() > 0 && pick < 30)
        h = stored[stored.size() - 1 - ($urandom % ((stored.size() < 8) ? stored.size() : 8))];
      else if (stored.size() > 0 && pick < 45)
        h = stored[$urandom % stored.size()];
      else if (stored.size() > 0 && pick < 55) begin
        // same address, tag differing in one bit: a near-miss collision,
        // each tag bit in turn, never sent twice (a repeat could be caught by
        // the CAM instead)
        h = stored[$urandom % stored.size()] ^ (HASH_W'(1) << (ADDR_W + (near.num() % TAG_W)));
        if (near.exists(h)) h = HASH_W'({$urandom, $urandom});
        near[h] = 1'b1;
      end else
        h = HASH_W'({$urandom, $urandom});
      hv_valid = 1; hv_hash = h; hv_state = STATE_W'($urandom); hv_round = REHASH_W'($urandom % 8);
      do begin
        @(posedge clk);
      end while (!hv_ready);
      e = classify(h, hv_state, hv_round);
      exp_q.push_back(e);
      sent++;
      #1;
      hv_valid = ($urandom % 100) < 85;
      if (!hv_valid) begin @(posedge clk); #1; end
    end
    hv_valid = 0;
    wait (n_res == sent);
    repeat (50) @(posedge clk);
    check(n_res == sent, "every hash got one verdict");
    check(n_bad_rd == 0, "no read issued while a read result waits");
    $display("uniques=%0d cam_hits=%0d table_dups=%0d collisions=%0d", n_uniq, n_cam, n_tdup, n_coll);
    check(n_uniq > 0 && n_cam > 0 && n_tdup > 0 && n_coll > 0, "all verdict kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
