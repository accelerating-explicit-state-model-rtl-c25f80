// down_next_state_gen: next state generator for the DOWN model.
//
// After `start` it first emits the start state (all counters 5). Then it
// repeatedly takes a current state from the unvisited queue (one cycle,
// FETCH) and applies one rule per cycle to it (APPLY, rules 0..5). A rule
// whose result equals the parent (its `same` bit) produces nothing that
// cycle; any other result is offered on out_valid/out_state and the
// generator waits for out_ready. So a parent with k enabled rules takes
// 1 + 6 cycles when the output is never stalled. `stop` (from the invariant
// checker) halts generation for good. idle is high while the generator
// waits for the unvisited queue, which with empty queues means verification
// is complete. One rule per cycle, the same bit and the unvisited queue as
// the only source after the start state follow the design; the FSM encoding
// is this implementation's. Reset is synchronous, active low.
module down_next_state_gen
  import down_model_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  // unvisited queue (pop side)
  input  logic        uq_valid,
  output logic        uq_pop,
  input  down_state_t uq_state,
  // generated states to enqueue
  output logic        out_valid,
  input  logic        out_ready,
  output down_state_t out_state,
  output logic        idle,
  output logic        ev_same
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_FETCH, S_APPLY, S_HALT} nsg_state_e;

  nsg_state_e   st;
  down_state_t  cur;
  logic [2:0]   rule;
  rule_result_t rr;
  logic         step;

  assign rr = apply_rule(cur, int'(rule));

  always_comb begin
    out_valid = 1'b0;
    out_state = rr.next;
    step      = 1'b0;
    unique case (st)
      S_START: begin
        out_valid = 1'b1;
        out_state = start_state();
      end
      S_APPLY: begin
        out_valid = !rr.same && !stop;
        step      = rr.same || out_ready;
      end
      default: ;
    endcase
  end

  assign uq_pop  = (st == S_FETCH) && uq_valid && !stop;
  assign idle    = (st == S_FETCH) && !uq_valid;
  assign ev_same = (st == S_APPLY) && rr.same && !stop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      cur  <= '0;
      rule <= '0;
    end else if (stop) begin
      st <= S_HALT;
    end else begin
      unique case (st)
        S_IDLE:  if (start) st <= S_START;
        S_START: if (out_ready) st <= S_FETCH;
        S_FETCH: if (uq_valid) begin
          cur  <= uq_state;
          rule <= '0;
          st   <= S_APPLY;
        end
        S_APPLY: if (step) begin
          if (rule == 3'(NUM_RULES - 1)) st <= S_FETCH;
          else rule <= rule + 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
