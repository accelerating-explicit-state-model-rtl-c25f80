// phast_top: the PHAST explicit state model checker, built for the DOWN model.
//
// Breadth-first reachability with a hash table of compacted states. States
// flow: next state generator -> enqueue -> (lookup pending queue, hash
// compaction, invariant checker) -> hash table lookup -> dequeue ->
// unvisited queue (new) / collision queue (hash collided) / discarded
// (duplicate). Collided states re-enter through enqueue and are rehashed
// from a copy rotated by one bit, kept in the shifted collision queue. The
// next state generator draws its parents from the unvisited queue. Every
// state lives in exactly one of: generator, lookup pending queue,
// collision queue, unvisited queue.
//
// Interface: pulse `start` once after reset. `stop` rises when a generated
// state breaks the safety property (bad_state holds it) and, with the
// default STOP_ON_VIOLATION, halts the search; `done` rises when
// no state is left anywhere, i.e. the whole reachable space was explored
// without a violation. `stats` counts the events of the run. Two external
// SDRAM banks are reached through request/response ports: ht_* holds the
// hash table (one {valid, tag} entry per address) and uq_* the body of the
// unvisited queue. Both must apply requests in acceptance order and return
// read data in order, any latency, without back-pressure on responses.
// The structure follows the design; queue depths, hash width and the SDRAM
// port protocol are this implementation's choices (see each module's header).
module phast_top
  import phast_pkg::*;
  import down_model_pkg::*;
#(
  parameter int unsigned HASH_W       = 40,
  parameter int unsigned HT_ADDR_W    = 25,
  parameter int unsigned CAM_DEPTH    = 32,
  parameter int unsigned HC_FANIN     = 6,
  parameter int unsigned HASH_SEED    = 32'h5EED_0001,
  parameter int unsigned LPQ_DEPTH    = 64,
  parameter int unsigned CQ_DEPTH     = 64,
  parameter int unsigned HTL_IQ_DEPTH = 16,
  parameter int unsigned HTL_MAX_OUT  = 16,
  parameter int unsigned HTL_BQ_DEPTH = 32,
  parameter int unsigned UQ_BUF_DEPTH = 512,
  parameter int unsigned UQ_ADDR_W    = 16,
  parameter bit          STOP_ON_VIOLATION = 1'b1,
  localparam int unsigned HT_ENTRY_W  = HASH_W - HT_ADDR_W + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  stop,
  output down_state_t           bad_state,
  output logic                  done,
  output phast_stats_t          stats,
  // hash table SDRAM bank
  output logic                  ht_req_valid,
  input  logic                  ht_req_ready,
  output logic                  ht_req_we,
  output logic [HT_ADDR_W-1:0]  ht_req_addr,
  output logic [HT_ENTRY_W-1:0] ht_req_wdata,
  input  logic                  ht_rsp_valid,
  input  logic [HT_ENTRY_W-1:0] ht_rsp_rdata,
  // unvisited queue SDRAM bank
  output logic                  uq_req_valid,
  input  logic                  uq_req_ready,
  output logic                  uq_req_we,
  output logic [UQ_ADDR_W-1:0]  uq_req_addr,
  output logic [STATE_W-1:0]    uq_req_wdata,
  input  logic                  uq_rsp_valid,
  input  logic [STATE_W-1:0]    uq_rsp_rdata
);
  localparam int unsigned LPQ_CW = $clog2(LPQ_DEPTH + 1);
  localparam int unsigned CQ_CW  = $clog2(CQ_DEPTH + 1);
  localparam int unsigned CNT_W  = (LPQ_CW > CQ_CW) ? LPQ_CW : CQ_CW;

  // next state generator <-> unvisited queue / enqueue
  logic        uq_pop_valid, uq_pop;
  down_state_t uq_pop_state;
  logic        nsg_valid, nsg_ready, nsg_idle;
  down_state_t nsg_state;
  // enqueue outputs
  logic        lpq_push, lpq_push_ready, hc_valid, hc_ready, hc_coll, inv_valid;
  down_state_t lpq_push_state, hc_state, inv_state;
  // queues
  logic              lpq_valid, lpq_pop, cq_valid, cq_pop, cq_push, cq_push_ready;
  down_state_t       lpq_state, cq_state, cq_push_state;
  logic [LPQ_CW-1:0] lpq_count;
  logic [CQ_CW-1:0]  cq_count;
  logic              sq_valid, sq_pop, sq_push, sq_push_ready;
  down_state_t       sq_state, sq_push_state;
  logic [REHASH_W-1:0] sq_round, sq_push_round, hv_round;
  // hash compaction -> lookup
  logic              hv_valid, hv_ready;
  logic [HASH_W-1:0] hv_hash;
  down_state_t       hv_state;
  // lookup -> dequeue
  logic              res_valid, res_ready;
  lookup_e           res_kind;
  // dequeue -> unvisited queue
  logic              uq_push, uq_push_ready, uq_empty;
  down_state_t       uq_push_state;
  // events
  logic ev_cam_hit, ev_read, ev_unique, ev_table_dup, ev_collision, ev_discard;
  logic ev_spill, ev_fill;
  logic running, violation, halt;

  // Verification halts on the first violation unless STOP_ON_VIOLATION is
  // cleared, in which case violations are only counted and the search runs
  // to completion (useful to measure a whole state space).
  assign halt = STOP_ON_VIOLATION && stop;

  down_next_state_gen u_nsg (
    .clk, .rst_n, .start, .stop(halt),
    .uq_valid(uq_pop_valid), .uq_pop, .uq_state(uq_pop_state),
    .out_valid(nsg_valid), .out_ready(nsg_ready), .out_state(nsg_state),
    .idle(nsg_idle), .ev_same());

  down_invariant_checker u_inv (
    .clk, .rst_n, .in_valid(inv_valid), .in_state(inv_state),
    .stop, .bad_state, .violation);

  enqueue #(.STATE_W(STATE_W), .CQ_DEPTH(CQ_DEPTH), .CNT_W(CNT_W)) u_enq (
    .nsg_valid, .nsg_ready, .nsg_state,
    .cq_valid, .cq_pop, .cq_state, .cq_count(CNT_W'(cq_count)),
    .lpq_valid(lpq_push), .lpq_ready(lpq_push_ready), .lpq_state(lpq_push_state),
    .lpq_count(CNT_W'(lpq_count)),
    .hc_valid, .hc_ready, .hc_state, .hc_coll,
    .inv_valid, .inv_state);

  phast_fifo #(.W(STATE_W), .DEPTH(LPQ_DEPTH)) u_lookup_pending_queue (
    .clk, .rst_n,
    .push_valid(lpq_push), .push_ready(lpq_push_ready), .push_data(lpq_push_state),
    .pop_valid(lpq_valid), .pop_ready(lpq_pop), .pop_data(lpq_state), .count(lpq_count));

  phast_fifo #(.W(STATE_W), .DEPTH(CQ_DEPTH)) u_collision_queue (
    .clk, .rst_n,
    .push_valid(cq_push), .push_ready(cq_push_ready), .push_data(cq_push_state),
    .pop_valid(cq_valid), .pop_ready(cq_pop), .pop_data(cq_state), .count(cq_count));

  phast_fifo #(.W(REHASH_W + STATE_W), .DEPTH(CQ_DEPTH)) u_shifted_collision_queue (
    .clk, .rst_n,
    .push_valid(sq_push), .push_ready(sq_push_ready), .push_data({sq_push_round, sq_push_state}),
    .pop_valid(sq_valid), .pop_ready(sq_pop), .pop_data({sq_round, sq_state}), .count());

  hash_compaction #(.STATE_W(STATE_W), .HASH_W(HASH_W), .FANIN(HC_FANIN),
                    .SEED(HASH_SEED)) u_hc (
    .clk, .rst_n,
    .in_valid(hc_valid), .in_ready(hc_ready), .in_state(hc_state), .in_coll(hc_coll),
    .sq_valid, .sq_pop, .sq_state, .sq_round,
    .out_valid(hv_valid), .out_ready(hv_ready), .out_hash(hv_hash), .out_state(hv_state),
    .out_round(hv_round));

  hash_table_lookup #(.STATE_W(STATE_W), .HASH_W(HASH_W), .ADDR_W(HT_ADDR_W),
                      .CAM_DEPTH(CAM_DEPTH), .IQ_DEPTH(HTL_IQ_DEPTH),
                      .MAX_OUT(HTL_MAX_OUT), .BQ_DEPTH(HTL_BQ_DEPTH)) u_htl (
    .clk, .rst_n,
    .hv_valid, .hv_ready, .hv_hash, .hv_state, .hv_round,
    .mem_req_valid(ht_req_valid), .mem_req_ready(ht_req_ready), .mem_req_we(ht_req_we),
    .mem_req_addr(ht_req_addr), .mem_req_wdata(ht_req_wdata),
    .mem_rsp_valid(ht_rsp_valid), .mem_rsp_rdata(ht_rsp_rdata),
    .res_valid, .res_ready, .res_kind,
    .sq_valid(sq_push), .sq_ready(sq_push_ready), .sq_state(sq_push_state),
    .sq_round(sq_push_round),
    .ev_cam_hit, .ev_read, .ev_unique, .ev_table_dup, .ev_collision);

  dequeue #(.STATE_W(STATE_W)) u_deq (
    .lpq_valid, .lpq_pop, .lpq_state,
    .res_valid, .res_ready, .res_kind,
    .uq_valid(uq_push), .uq_ready(uq_push_ready), .uq_state(uq_push_state),
    .cq_valid(cq_push), .cq_ready(cq_push_ready), .cq_state(cq_push_state),
    .ev_discard);

  unvisited_queue #(.STATE_W(STATE_W), .BUF_DEPTH(UQ_BUF_DEPTH),
                    .MEM_ADDR_W(UQ_ADDR_W)) u_uq (
    .clk, .rst_n,
    .push_valid(uq_push), .push_ready(uq_push_ready), .push_state(uq_push_state),
    .pop_valid(uq_pop_valid), .pop_ready(uq_pop), .pop_state(uq_pop_state),
    .mem_req_valid(uq_req_valid), .mem_req_ready(uq_req_ready), .mem_req_we(uq_req_we),
    .mem_req_addr(uq_req_addr), .mem_req_wdata(uq_req_wdata),
    .mem_rsp_valid(uq_rsp_valid), .mem_rsp_rdata(uq_rsp_rdata),
    .empty(uq_empty), .ev_spill, .ev_fill);

  // Completion: generator waiting for work and every queue empty. A state
  // admitted by enqueue sits in the lookup pending queue until its verdict,
  // so hash compaction and lookup are empty when that queue is.
  logic done_now;
  assign done_now = running && nsg_idle && uq_empty && !lpq_valid && !cq_valid && !halt;

  function automatic logic [31:0] sat_inc(logic [31:0] v, logic en);
    return (en && v != '1) ? v + 1'b1 : v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      stats   <= '0;
    end else begin
      if (start && !running && !done) running <= 1'b1;
      if (done_now) begin
        done    <= 1'b1;
        running <= 1'b0;
      end
      if (halt) running <= 1'b0;
      stats.generated   <= sat_inc(stats.generated, nsg_valid && nsg_ready);
      stats.cam_hits    <= sat_inc(stats.cam_hits, ev_cam_hit);
      stats.table_reads <= sat_inc(stats.table_reads, ev_read);
      stats.uniques     <= sat_inc(stats.uniques, ev_unique);
      stats.table_dups  <= sat_inc(stats.table_dups, ev_table_dup);
      stats.collisions  <= sat_inc(stats.collisions, ev_collision);
      stats.uq_spills   <= sat_inc(stats.uq_spills, ev_spill);
      stats.uq_fills    <= sat_inc(stats.uq_fills, ev_fill);
      stats.violations  <= sat_inc(stats.violations, violation);
      stats.cycles      <= sat_inc(stats.cycles, running && !done_now && !halt);
    end
  end

  // Every duplicate verdict retires exactly one pending state.
  a_discard_matches: assert property (@(posedge clk) disable iff (!rst_n)
                                      ev_discard |-> (res_kind == LK_DUPLICATE));
endmodule
