// tb_hash_compaction: compares the XOR-tree hash with the sequential method
// it replaces: start from zero and, for every set input bit i, XOR in row i
// of the hash matrix (rows STATE_W.. hold the rehash round bits). Random
// original states and collision states (taking state and round from a
// shifted-queue model) are streamed with random output stalls. Checks hash,
// carried state and round, order, that the shifted queue is popped exactly
// for collision inputs, and the latency of 3 cycles (input register plus
// two tree levels for 22 inputs with fan-in 6) when never stalled.
module tb_hash_compaction;
  import phast_pkg::*;
  localparam int unsigned STATE_W = 18, HASH_W = 40, SEED = 32'h5EED_0001;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_coll, sq_valid, sq_pop, out_valid, out_ready;
  logic [STATE_W-1:0] in_state, sq_state, out_state;
  logic [REHASH_W-1:0] sq_round, out_round;
  logic [HASH_W-1:0] out_hash;
  int checks = 0, failures = 0;

  hash_compaction #(.STATE_W(STATE_W), .HASH_W(HASH_W), .SEED(SEED)) dut (.*);

  typedef struct { logic [STATE_W-1:0] s; logic [REHASH_W-1:0] r; longint t; } exp_t;
  exp_t exp_q [$];
  logic [STATE_W-1:0] sq_s [$];
  logic [REHASH_W-1:0] sq_r [$];
  longint cyc = 0;
  int lat_checked = 0;
  bit do_in, do_out;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [HASH_W-1:0] serial_hash(logic [STATE_W-1:0] s, logic [REHASH_W-1:0] r);
    logic [HASH_W-1:0] h;
    logic [STATE_W+REHASH_W-1:0] v;
    h = '0;
    v = {r, s};
    for (int unsigned i = 0; i < STATE_W + REHASH_W; i++)
      if (v[i]) for (int unsigned c = 0; c < HASH_W; c++)
        h[c] ^= hash_matrix_bit(i, c, SEED);
    return h;
  endfunction

  assign sq_valid = sq_s.size() > 0;
  assign sq_state = sq_valid ? sq_s[0] : '0;
  assign sq_round = sq_valid ? sq_r[0] : '0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 0; in_coll = 0; in_state = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 3000; n++) begin
      bit stall_phase;
      stall_phase = (n >= 200);
      in_valid  = (n < 200) ? 1'b1 : (($urandom % 100) < 70);
      in_coll   = (($urandom % 100) < 30);
      in_state  = STATE_W'($urandom);
      out_ready = stall_phase ? (($urandom % 100) < 60) : 1'b1;
      if (in_coll && ($urandom % 4 != 0)) begin
        sq_s.push_back(STATE_W'($urandom));
        sq_r.push_back(REHASH_W'(1 + $urandom % 15));
      end
      #1;
      if (out_valid) begin
        check(exp_q.size() > 0, "output expected");
        if (exp_q.size() > 0) begin
          check(out_hash == serial_hash(exp_q[0].s, exp_q[0].r), "hash value");
          check(out_state == exp_q[0].s && out_round == exp_q[0].r, "state and round");
          if (!stall_phase && n > 10) begin
            check(cyc - exp_q[0].t == 3, "latency 3 cycles");
            lat_checked++;
          end
        end
      end
      check(sq_pop == (in_valid && in_ready && in_coll), "shifted queue popped for collisions only");
      if (in_valid && in_coll && !sq_valid) check(!in_ready, "collision waits for shifted queue");
      do_out = out_valid && out_ready;
      do_in  = in_valid && in_ready;
      @(posedge clk);
      #1;
      if (do_out) void'(exp_q.pop_front());
      if (do_in) begin
        exp_t e;
        e.s = in_coll ? sq_s[0] : in_state;
        e.r = in_coll ? sq_r[0] : '0;
        e.t = cyc - 1;
        exp_q.push_back(e);
        if (in_coll) begin void'(sq_s.pop_front()); void'(sq_r.pop_front()); end
      end
    end
    check(lat_checked > 100, "latency measured");
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
