// tb_dequeue: drives all combinations of pending state, verdict and
// destination readiness, and checks that a unique state goes to the
// unvisited queue, a collision to the collision queue, a duplicate nowhere,
// and that the pending state is popped exactly when its verdict is taken.
module tb_dequeue;
  import phast_pkg::*;
  localparam int unsigned STATE_W = 18;
  logic lpq_valid, lpq_pop, res_valid, res_ready, uq_valid, uq_ready, cq_valid, cq_ready;
  logic ev_discard;
  lookup_e res_kind;
  logic [STATE_W-1:0] lpq_state, uq_state, cq_state;
  int checks = 0, failures = 0;

  dequeue #(.STATE_W(STATE_W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int iter = 0; iter < 500; iter++) begin
      bit dest, go;
      lpq_valid = iter[0]; res_valid = iter[1]; uq_ready = iter[2]; cq_ready = iter[3];
      case (iter[5:4])
        2'd0: res_kind = LK_UNIQUE;
        2'd1: res_kind = LK_DUPLICATE;
        default: res_kind = LK_COLLISION;
      endcase
      lpq_state = STATE_W'($urandom);
      #1;
      dest = (res_kind == LK_UNIQUE) ? uq_ready : (res_kind == LK_COLLISION) ? cq_ready : 1'b1;
      go = lpq_valid && res_valid && dest;
      check(lpq_pop == go, "pop when verdict and destination ready");
      check(res_ready == (lpq_valid && dest), "res_ready");
      check(uq_valid == (go && res_kind == LK_UNIQUE), "unique to unvisited queue");
      check(cq_valid == (go && res_kind == LK_COLLISION), "collision to collision queue");
      check(ev_discard == (go && res_kind == LK_DUPLICATE), "duplicate discarded");
      if (uq_valid) check(uq_state == lpq_state, "unvisited data");
      if (cq_valid) check(cq_state == lpq_state, "collision data");
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
