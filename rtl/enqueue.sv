// enqueue: entry point of states into the lookup pipeline.
//
// Each cycle it takes one state, either a new state from the next state
// generator (preferred) or, when none is offered, an original collided
// state from the collision queue. The state is written to the lookup
// pending queue and at the same time handed to hash compaction, with
// hc_coll set for a collision state so that hash compaction rehashes the
// matching shifted copy. New states are also shown to the invariant checker
// (inv_valid/inv_state); collision states were checked when first made.
//
// Both destinations must accept in the same cycle (lpq_ready and hc_ready);
// hc_valid/hc_coll depend only on the offers, lpq_valid is the transfer.
// One rule is this implementation's own: a new state is only admitted while
// lpq_count + cq_count < CQ_DEPTH. Every state in the lookup pending queue
// may come back as a collision, so this keeps room in the collision queue
// for all of them and the loop lookup pending queue -> collision queue ->
// enqueue can never lock up. The block is combinational.
module enqueue #(
  parameter int unsigned STATE_W  = 18,
  parameter int unsigned CQ_DEPTH = 64,
  parameter int unsigned CNT_W    = 8
) (
  // next state generator
  input  logic               nsg_valid,
  output logic               nsg_ready,
  input  logic [STATE_W-1:0] nsg_state,
  // collision queue (pop side)
  input  logic               cq_valid,
  output logic               cq_pop,
  input  logic [STATE_W-1:0] cq_state,
  input  logic [CNT_W-1:0]   cq_count,
  // lookup pending queue (push side)
  output logic               lpq_valid,
  input  logic               lpq_ready,
  output logic [STATE_W-1:0] lpq_state,
  input  logic [CNT_W-1:0]   lpq_count,
  // hash compaction
  output logic               hc_valid,
  input  logic               hc_ready,
  output logic [STATE_W-1:0] hc_state,
  output logic               hc_coll,
  // invariant checker
  output logic               inv_valid,
  output logic [STATE_W-1:0] inv_state
);
  logic room, want_new, src_coll, fire;

  // The source is chosen from the offers alone; the sinks only gate the move.
  assign room     = ({1'b0, lpq_count} + {1'b0, cq_count}) < (CNT_W + 1)'(CQ_DEPTH);
  assign want_new = nsg_valid && room;
  assign src_coll = !want_new && cq_valid;

  assign hc_valid  = want_new || src_coll;
  assign hc_coll   = src_coll;
  assign hc_state  = src_coll ? cq_state : nsg_state;
  assign fire      = hc_valid && hc_ready && lpq_ready;

  assign nsg_ready = room && hc_ready && lpq_ready;
  assign cq_pop    = fire && src_coll;
  assign lpq_valid = fire;
  assign lpq_state = hc_state;
  assign inv_valid = fire && want_new;
  assign inv_state = nsg_state;
endmodule
