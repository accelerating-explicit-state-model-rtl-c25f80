// tb_down_next_state_gen: after start the generator must offer the start
// state (all counters 5); then, for each parent taken from an unvisited
// queue model, exactly the results of its enabled rules in rule order
// (reference rules written here). Parents include the all-zero state,
// which has no enabled rule. Checks: outputs and order, parents taken in
// order, 7 cycles per parent (one fetch plus six rule cycles) when the
// output is never stalled, identical outputs under random stalls, idle
// while the queue is empty, and nothing generated or taken after stop.
module tb_down_next_state_gen;
  import down_model_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, stop, uq_valid, uq_pop, out_valid, out_ready, idle, ev_same;
  down_state_t uq_state, out_state;
  int checks = 0, failures = 0;

  down_next_state_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic void ref_children(logic [17:0] s, ref logic [17:0] q [$]);
    for (int r = 0; r < 6; r++) begin
      int c [6];
      logic [17:0] n;
      for (int i = 0; i < 6; i++) c[i] = int'(s[3*i +: 3]);
      if (c[r] > 0) begin
        c[r]--;
        if (r < 4 && c[r+1] > 0) c[r+1]--;
        for (int i = 0; i < 6; i++) n[3*i +: 3] = 3'(c[i]);
        q.push_back(n);
      end
    end
  endfunction

  logic [17:0] parents [$];
  logic [17:0] exp_q [$];
  longint cyc = 0, last_pop = -1;
  int pops = 0, outs = 0, spacing_ok = 0;
  bit stalls = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // unvisited queue model outputs, refreshed whenever the model changes
  task automatic refresh();
    uq_valid = parents.size() > 0;
    uq_state = uq_valid ? parents[0] : '0;
  endtask

  // Handshakes are sampled in the middle of the cycle and the models are
  // updated just after the clock edge that completes them.
  bit s_fire, s_pop;
  logic [17:0] s_out;
  always @(negedge clk) begin
    s_fire = rst_n && out_valid && out_ready;
    s_pop  = rst_n && uq_pop;
    s_out  = out_state;
  end

  always @(posedge clk) begin
    #1;
    if (s_fire) begin
      outs++;
      check(exp_q.size() > 0, "output expected");
      if (exp_q.size() > 0) begin
        check(s_out == exp_q[0], "generated state");
        void'(exp_q.pop_front());
      end
    end
    if (s_pop) begin
      if (!stalls && last_pop >= 0 && pops > 1) begin
        check(cyc - last_pop == 7, "7 cycles per parent");
        spacing_ok++;
      end
      last_pop = cyc;
      pops++;
      ref_children(parents[0], exp_q);
      void'(parents.pop_front());
      refresh();
    end
    s_fire = 0;
    s_pop  = 0;
  end

  function automatic logic [17:0] rand_state();
    logic [17:0] s;
    for (int i = 0; i < 6; i++) s[3*i +: 3] = 3'($urandom % 6);
    return s;
  endfunction

  initial begin
    start = 0; stop = 0; out_ready = 1;
    refresh();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!out_valid, "quiet before start");
    exp_q.push_back({6{3'd5}});
    start = 1;
    @(posedge clk); #1;
    start = 0;
    repeat (5) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "start state generated");
    check(idle, "idle with empty unvisited queue");
    // unstalled: a burst of parents
    parents.push_back('0);
    for (int i = 0; i < 40; i++) parents.push_back(rand_state());
    refresh();
    wait (parents.size() == 0);
    repeat (10) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "all children of unstalled parents");
    check(idle, "idle again");
    // stalled output
    stalls = 1;
    for (int i = 0; i < 40; i++) parents.push_back(rand_state());
    refresh();
    while (parents.size() > 0) begin
      out_ready = ($urandom % 100) < 50;
      @(posedge clk); #1;
    end
    out_ready = 1;
    repeat (10) @(posedge clk);
    #1;
    check(exp_q.size() == 0, "all children of stalled parents");
    check(spacing_ok > 30, "rate measured");
    // stop halts everything
    for (int i = 0; i < 5; i++) parents.push_back({6{3'd4}});
    refresh();
    repeat (2) @(posedge clk);
    #1;
    stop = 1;
    #1 check(!out_valid, "no output while stopped");
    begin
      int outs_before;
      outs_before = outs;
      repeat (50) @(posedge clk);
      #1;
      check(outs == outs_before, "nothing generated after stop");
      check(parents.size() >= 3, "no parents taken after stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
