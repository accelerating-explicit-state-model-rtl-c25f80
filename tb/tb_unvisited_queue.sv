// tb_unvisited_queue: random pushes and pops through an unvisited queue with
// 4-entry buffers and a 64-word SDRAM region (SDRAM model with random
// latency and ready). Checks strict first-in first-out order against a
// queue model, that the `empty` flag is exact, that states both bypass the
// SDRAM and spill to it and come back, and that push_ready only drops while
// at least a bottom buffer's worth of states is queued.
module tb_unvisited_queue;
  localparam int unsigned STATE_W = 18, BUF_DEPTH = 4, MEM_ADDR_W = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push_valid, push_ready, pop_valid, pop_ready;
  logic [STATE_W-1:0] push_state, pop_state;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid, empty, ev_spill, ev_fill;
  logic [MEM_ADDR_W-1:0] mem_req_addr;
  logic [STATE_W-1:0] mem_req_wdata, mem_rsp_rdata;
  int checks = 0, failures = 0;

  unvisited_queue #(.STATE_W(STATE_W), .BUF_DEPTH(BUF_DEPTH), .MEM_ADDR_W(MEM_ADDR_W)) dut (.*);
  sdram_model #(.ADDR_W(MEM_ADDR_W), .DATA_W(STATE_W), .MIN_LAT(3), .MAX_LAT(12)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [STATE_W-1:0] model [$];
  int spills = 0, fills = 0, bypass = 0, pushes = 0, full_seen = 0;
  bit do_push, do_pop;
  logic [STATE_W-1:0] next_val = '0;

  initial begin
    push_valid = 0; pop_ready = 0; push_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int cyc = 0; cyc < 12000; cyc++) begin
      int pp;
      pp = (cyc % 3000 < 1000) ? 90 : (cyc % 3000 < 2000) ? 10 : 50;
      push_valid = ($urandom % 100) < pp;
      pop_ready  = ($urandom % 100) < (100 - pp);
      push_state = next_val;
      #1;
      if (pop_valid) check(pop_state == model[0], "FIFO order");
      check(empty == (model.size() == 0), "empty flag");
      if (!push_ready) begin
        full_seen++;
        check(model.size() >= BUF_DEPTH, "push_ready low only with a full bottom buffer");
      end
      if (ev_spill) spills++;
      if (ev_fill) fills++;
      if (dut.bypass) bypass++;
      do_push = push_valid && push_ready;
      do_pop  = pop_valid && pop_ready;
      @(posedge clk);
      #1;
      if (do_pop) void'(model.pop_front());
      if (do_push) begin model.push_back(push_state); next_val = next_val + 1'b1; pushes++; end
    end
    $display("pushes=%0d spills=%0d fills=%0d bypass=%0d full=%0d", pushes, spills, fills, bypass, full_seen);
    check(spills > 0 && fills > 0 && bypass > 0, "spill, fill and bypass all used");
    check(full_seen > 0, "back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
