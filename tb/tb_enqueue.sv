// tb_enqueue: drives every combination of offers (new state, collision
// state), sink readiness and queue occupancy, and checks the choice of
// source against the rules: a new state wins when it is admitted
// (lpq_count + cq_count below CQ_DEPTH), otherwise a waiting collision
// state is taken; nothing moves unless both the lookup pending queue and
// hash compaction accept; only new states go to the invariant checker.
module tb_enqueue;
  localparam int unsigned STATE_W = 18, CQ_DEPTH = 8, CNT_W = 5;
  logic nsg_valid, nsg_ready, cq_valid, cq_pop, lpq_valid, lpq_ready, hc_valid, hc_ready;
  logic hc_coll, inv_valid;
  logic [STATE_W-1:0] nsg_state, cq_state, lpq_state, hc_state, inv_state;
  logic [CNT_W-1:0] cq_count, lpq_count;
  int checks = 0, failures = 0;

  enqueue #(.STATE_W(STATE_W), .CQ_DEPTH(CQ_DEPTH), .CNT_W(CNT_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int iter = 0; iter < 2000; iter++) begin
      bit room, exp_new, exp_coll, sinks;
      nsg_valid = iter[0]; cq_valid = iter[1]; lpq_ready = iter[2]; hc_ready = iter[3];
      if (iter < 16) begin
        lpq_count = '0; cq_count = '0;
      end else begin
        lpq_count = CNT_W'($urandom % 9); cq_count = CNT_W'($urandom % 9);
      end
      nsg_state = STATE_W'($urandom); cq_state = STATE_W'($urandom);
      #1;
      room     = (int'(lpq_count) + int'(cq_count)) < CQ_DEPTH;
      sinks    = lpq_ready && hc_ready;
      exp_new  = nsg_valid && room;
      exp_coll = !exp_new && cq_valid;
      check(hc_valid == (exp_new || exp_coll), "hc_valid");
      check(hc_coll == exp_coll, "hc_coll marks collision states");
      if (exp_new || exp_coll) check(hc_state == (exp_coll ? cq_state : nsg_state), "state source");
      check(lpq_valid == ((exp_new || exp_coll) && sinks), "move needs both sinks");
      check(lpq_state == hc_state, "same state to both sinks");
      check(nsg_ready == (room && sinks), "nsg_ready");
      check((nsg_valid && nsg_ready) == (exp_new && sinks), "new state taken");
      check(cq_pop == (exp_coll && sinks), "collision queue popped");
      check(inv_valid == (exp_new && sinks) && (!inv_valid || inv_state == nsg_state),
            "invariant checker sees new states only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
