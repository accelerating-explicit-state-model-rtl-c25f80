// down_model_pkg: state layout and transition rules of the DOWN model.
//
// DOWN is six 3-bit counters that all start at 5. Counter i (0..5) sits in
// state bits [3i+2:3i]; the state is 18 bits. There are six rules, one per
// counter. Rule i is enabled when counter i is above zero and decrements it;
// rules 0..3 also decrement counter i+1 when that one is above zero (so
// counters 1&2, 2&3, 3&4 and 4&5, counted from one, fall together), while
// rules 4 and 5 touch only their own counter. A disabled rule returns the
// parent state with `same` set. The safety property is that the sum of the
// counters is above zero, which fails once all reach zero. The reading that
// the partner is decremented only when it is itself non-zero is this
// implementation's; it yields 10,962 reachable states.
package down_model_pkg;

  localparam int unsigned NUM_CTR   = 6;
  localparam int unsigned CTR_W     = 3;
  localparam int unsigned STATE_W   = NUM_CTR * CTR_W;
  localparam int unsigned NUM_RULES = 6;
  localparam logic [CTR_W-1:0] CTR_INIT = 3'd5;

  typedef logic [STATE_W-1:0] down_state_t;

  typedef struct packed {
    logic        same;  // rule did not change the parent state
    down_state_t next;  // generated state
  } rule_result_t;

  function automatic down_state_t start_state();
    down_state_t s;
    for (int unsigned i = 0; i < NUM_CTR; i++) s[i*CTR_W +: CTR_W] = CTR_INIT;
    return s;
  endfunction

  function automatic rule_result_t apply_rule(down_state_t s, int unsigned r);
    rule_result_t res;
    res.next = s;
    res.same = 1'b1;
    for (int unsigned i = 0; i < NUM_RULES; i++) begin
      if (i == r && s[i*CTR_W +: CTR_W] != '0) begin
        res.same = 1'b0;
        res.next[i*CTR_W +: CTR_W] = s[i*CTR_W +: CTR_W] - 1'b1;
        if (i < 4 && s[(i+1)*CTR_W +: CTR_W] != '0)
          res.next[(i+1)*CTR_W +: CTR_W] = s[(i+1)*CTR_W +: CTR_W] - 1'b1;
      end
    end
    return res;
  endfunction

  // Safety property: sum of all counters > 0.
  function automatic logic property_holds(down_state_t s);
    return s != '0;
  endfunction

endpackage
