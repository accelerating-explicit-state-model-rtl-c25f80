// dequeue: retires states from the lookup pending queue.
//
// The state at the head of the lookup pending queue is paired with the next
// verdict of the hash table lookup (both arrive in the same order). A unique
// state is written to the unvisited queue, a duplicate is discarded, and a
// collided state is written to the collision queue to be reintroduced. The
// pairing follows the design; the ready/valid handshake is this
// implementation's. Combinational: a state leaves in the cycle that both the
// verdict and the destination are ready.
module dequeue
  import phast_pkg::*;
#(
  parameter int unsigned STATE_W = 18
) (
  // lookup pending queue (pop side)
  input  logic               lpq_valid,
  output logic               lpq_pop,
  input  logic [STATE_W-1:0] lpq_state,
  // verdicts from hash table lookup
  input  logic               res_valid,
  output logic               res_ready,
  input  lookup_e            res_kind,
  // unvisited queue (push side)
  output logic               uq_valid,
  input  logic               uq_ready,
  output logic [STATE_W-1:0] uq_state,
  // collision queue (push side)
  output logic               cq_valid,
  input  logic               cq_ready,
  output logic [STATE_W-1:0] cq_state,
  // one-cycle strobe per discarded duplicate
  output logic               ev_discard
);
  logic dest_ok;

  always_comb begin
    unique case (res_kind)
      LK_UNIQUE:    dest_ok = uq_ready;
      LK_COLLISION: dest_ok = cq_ready;
      default:      dest_ok = 1'b1;
    endcase
  end

  assign res_ready  = lpq_valid && dest_ok;
  assign lpq_pop    = res_valid && res_ready;
  assign uq_valid   = lpq_pop && res_kind == LK_UNIQUE;
  assign cq_valid   = lpq_pop && res_kind == LK_COLLISION;
  assign uq_state   = lpq_state;
  assign cq_state   = lpq_state;
  assign ev_discard = lpq_pop && res_kind == LK_DUPLICATE;
endmodule
