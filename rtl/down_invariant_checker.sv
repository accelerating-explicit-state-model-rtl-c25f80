// down_invariant_checker: safety property check for the DOWN model.
//
// Every newly generated state is checked in the cycle it is offered
// (in_valid/in_state) against the property "sum of counters > 0", i.e. the
// state is not all zeros. On the first violation `stop` rises in the next
// cycle and stays high until reset, and the offending state is kept in
// bad_state as the counterexample end point. `violation` is a same-cycle
// strobe for every failing state (used for counting). Checking at generation time,
// one state per cycle, and the sticky stop follow the design; keeping the
// state is this implementation's addition.
module down_invariant_checker
  import down_model_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  down_state_t in_state,
  output logic        stop,
  output down_state_t bad_state,
  output logic        violation
);
  assign violation = in_valid && !property_holds(in_state);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stop      <= 1'b0;
      bad_state <= '0;
    end else if (in_valid && !stop && !property_holds(in_state)) begin
      stop      <= 1'b1;
      bad_state <= in_state;
    end
  end
endmodule
