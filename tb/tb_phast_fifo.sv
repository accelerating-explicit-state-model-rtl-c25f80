// tb_phast_fifo: random push/pop traffic against a queue model. Checks the
// popped data order, the count, full (push_ready low at DEPTH) and empty
// (pop_valid low at zero), and that a word pushed in cycle t is poppable in
// cycle t+1.
module tb_phast_fifo;
  localparam int unsigned W = 18, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push_valid, push_ready, pop_valid, pop_ready;
  logic [W-1:0] push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int fulls = 0, empties = 0;
  bit do_push, do_pop;

  phast_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-biased, drain-biased, balanced
      int pp, qq;
      pp = (cyc % 1000 < 300) ? 85 : (cyc % 1000 < 600) ? 15 : 50;
      qq = 100 - pp;
      push_valid = (($urandom % 100) < pp);
      pop_ready  = (($urandom % 100) < qq);
      push_data  = W'($urandom);
      #1;
      check(int'(count) == model.size(), "count");
      check(push_ready == (model.size() < DEPTH), "push_ready");
      check(pop_valid == (model.size() > 0), "pop_valid");
      if (model.size() == DEPTH) fulls++;
      if (model.size() == 0) empties++;
      if (pop_valid) check(pop_data == model[0], "pop data order");
      do_pop  = pop_valid && pop_ready;
      do_push = push_valid && push_ready;
      @(posedge clk);
      #1;
      if (do_pop) void'(model.pop_front());
      if (do_push) model.push_back(push_data);
    end
    check(fulls > 0 && empties > 0, "reached full and empty");
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
