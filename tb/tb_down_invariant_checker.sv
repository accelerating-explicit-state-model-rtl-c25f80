// tb_down_invariant_checker: offers random DOWN states (never all zero) and
// checks that stop stays low, then offers the all-zero state and checks
// that stop rises in the next cycle with bad_state zero, that `violation`
// flags exactly that cycle, and that stop stays high afterwards. An
// all-zero value with in_valid low must be ignored.
module tb_down_invariant_checker;
  import down_model_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, stop, violation;
  down_state_t in_state, bad_state;
  int checks = 0, failures = 0;

  down_invariant_checker dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; in_state = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    in_valid = 0; in_state = '0;
    #1 check(!violation, "ignored when not valid");
    @(posedge clk); #1;
    check(!stop, "no stop for an invalid zero state");
    for (int i = 0; i < 500; i++) begin
      in_valid = $urandom % 2;
      do in_state = 18'($urandom); while (in_state == '0);
      #1 check(!violation, "non-zero state holds");
      @(posedge clk); #1;
      check(!stop, "no stop for legal states");
    end
    in_valid = 1; in_state = '0;
    #1 check(violation, "violation flagged");
    @(posedge clk); #1;
    check(stop, "stop after violation");
    check(bad_state == '0, "counterexample kept");
    in_state = 18'h1;
    repeat (10) @(posedge clk);
    #1;
    check(stop && bad_state == '0, "stop sticky, counterexample unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
