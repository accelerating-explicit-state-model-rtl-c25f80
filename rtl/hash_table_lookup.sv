// hash_table_lookup: decides for every hashed state whether it is new, a
// duplicate or a collision, using a CAM and a hash table in external SDRAM.
//
// A hash value is split into a table address (low ADDR_W bits) and a tag
// (the remaining high bits). A table entry is {valid, tag}. Hash values are
// queued on arrival (input queue) and then handled in phases, following the
// design's CAM phase:
//   * Read phase: each queued hash is looked up in the CAM. A hit is a
//     duplicate and needs no memory access. A miss is written into the CAM
//     (two cycles, during which the CAM takes no lookup) and issues a read of
//     its table address. Reads keep being issued until the first read result
//     returns (or MAX_OUT reads are outstanding).
//   * Drain phase: no new reads are issued. Each returned entry is compared
//     with its tag: empty -> unique, and {1, tag} is written to the table;
//     equal tag -> duplicate; other tag -> collision, and the hashed state
//     rotated left by one bit is pushed to the shifted collision queue
//     (sq_*) with its rehash round (hv_round) plus one. CAM hits may still be accepted. When the last read of the batch
//     is resolved the read phase starts again.
// Verdicts (res_*) leave in the order the hash values arrived, matching the
// order of the lookup pending queue. Because all reads of a batch are issued
// before any of its writes, two states of one batch that share an address
// would both read an empty slot; a small table of the addresses written in
// the current batch is checked first to resolve this. The memory side is a
// request channel (mem_req_*, valid/ready, reads and writes in one stream)
// and an in-order read response channel with no back-pressure (mem_rsp_*);
// the memory must apply requests in the order accepted.
//
// From the design: the CAM size (32), the CAM/read phase and its end on the
// first returning read, the {valid, tag} entry, the three verdicts and the
// one-bit shift of collided states. This implementation's choices: the
// queue depths, MAX_OUT, the rotate (rather than a lossy shift), the
// same-batch address table, and the default widths (40-bit hash, 25-bit
// address = 32 M entries, one 256 MB bank of 8-byte entries).
module hash_table_lookup
  import phast_pkg::*;
#(
  parameter int unsigned STATE_W   = 18,
  parameter int unsigned HASH_W    = 40,
  parameter int unsigned ADDR_W    = 25,
  parameter int unsigned CAM_DEPTH = 32,
  parameter int unsigned IQ_DEPTH  = 16,
  parameter int unsigned MAX_OUT   = 16,
  parameter int unsigned BQ_DEPTH  = 32,
  localparam int unsigned TAG_W    = HASH_W - ADDR_W,
  localparam int unsigned ENTRY_W  = TAG_W + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // hashed states from hash compaction
  input  logic               hv_valid,
  output logic               hv_ready,
  input  logic [HASH_W-1:0]  hv_hash,
  input  logic [STATE_W-1:0] hv_state,
  input  logic [REHASH_W-1:0] hv_round,
  // hash table memory (SDRAM bank)
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [ADDR_W-1:0]  mem_req_addr,
  output logic [ENTRY_W-1:0] mem_req_wdata,
  input  logic               mem_rsp_valid,
  input  logic [ENTRY_W-1:0] mem_rsp_rdata,
  // verdicts to dequeue, in arrival order
  output logic               res_valid,
  input  logic               res_ready,
  output lookup_e            res_kind,
  // shifted states of collisions, to the shifted collision queue
  output logic               sq_valid,
  input  logic               sq_ready,
  output logic [STATE_W-1:0] sq_state,
  output logic [REHASH_W-1:0] sq_round,
  // one-cycle event strobes for statistics
  output logic               ev_cam_hit,
  output logic               ev_read,
  output logic               ev_unique,
  output logic               ev_table_dup,
  output logic               ev_collision
);
  localparam int unsigned IQ_W = HASH_W + REHASH_W + STATE_W;
  localparam int unsigned BQ_W = 1 + HASH_W + REHASH_W + STATE_W;
  localparam int unsigned OW   = $clog2(MAX_OUT + 1);
  localparam int unsigned FW   = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1;

  // ---------------- input queue ----------------
  logic               iq_valid, iq_pop;
  logic [IQ_W-1:0]    iq_data;
  logic [HASH_W-1:0]  iq_hash;
  logic [STATE_W-1:0] iq_state;
  logic [REHASH_W-1:0] iq_round;

  phast_fifo #(.W(IQ_W), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .push_valid(hv_valid), .push_ready(hv_ready), .push_data({hv_hash, hv_round, hv_state}),
    .pop_valid(iq_valid), .pop_ready(iq_pop), .pop_data(iq_data), .count());
  assign {iq_hash, iq_round, iq_state} = iq_data;

  // ---------------- CAM ----------------
  logic cam_hit, cam_busy, read_fire;
  cam #(.KEY_W(HASH_W), .DEPTH(CAM_DEPTH)) u_cam (
    .clk, .rst_n, .lk_key(iq_hash), .hit(cam_hit),
    .wr_en(read_fire), .wr_key(iq_hash), .busy(cam_busy));

  // ---------------- batch queue and response queue ----------------
  logic               bq_push_ready, bq_valid, bq_pop;
  logic [BQ_W-1:0]    bq_data;
  logic               bq_pending;
  logic [HASH_W-1:0]  bq_hash;
  logic [STATE_W-1:0] bq_state;
  logic [REHASH_W-1:0] bq_round;
  logic               rq_valid, rq_pop;
  logic [ENTRY_W-1:0] rq_data;
  logic [$clog2(MAX_OUT+1)-1:0] rq_count;
  logic               hit_take;

  phast_fifo #(.W(BQ_W), .DEPTH(BQ_DEPTH)) u_bq (
    .clk, .rst_n,
    .push_valid(hit_take || read_fire), .push_ready(bq_push_ready),
    .push_data({read_fire, iq_hash, iq_round, iq_state}),
    .pop_valid(bq_valid), .pop_ready(bq_pop), .pop_data(bq_data), .count());
  assign {bq_pending, bq_hash, bq_round, bq_state} = bq_data;

  phast_fifo #(.W(ENTRY_W), .DEPTH(MAX_OUT)) u_rq (
    .clk, .rst_n,
    .push_valid(mem_rsp_valid), .push_ready(), .push_data(mem_rsp_rdata),
    .pop_valid(rq_valid), .pop_ready(rq_pop), .pop_data(rq_data), .count(rq_count));

  // ---------------- phase control ----------------
  logic          drain;
  logic [OW-1:0] outstanding;
  logic          head_ok, read_want;

  assign head_ok   = iq_valid && !cam_busy && bq_push_ready;
  assign hit_take  = head_ok && cam_hit;
  assign read_want = head_ok && !cam_hit && !drain && !rq_valid && !mem_rsp_valid
                     && (outstanding < OW'(MAX_OUT));
  assign read_fire = read_want && mem_req_ready;
  assign iq_pop    = hit_take || read_fire;

  // ---------------- resolution of the batch head ----------------
  logic [ADDR_W-1:0]  fwd_addr [MAX_OUT];
  logic [TAG_W-1:0]   fwd_tag  [MAX_OUT];
  logic [OW-1:0]      fwd_n;
  logic [ADDR_W-1:0]  h_addr;
  logic [TAG_W-1:0]   h_tag;
  logic [ENTRY_W-1:0] eff;
  lookup_e            kind;
  logic               can_go, fire, write_fire;

  assign h_addr = bq_hash[ADDR_W-1:0];
  assign h_tag  = bq_hash[HASH_W-1:ADDR_W];

  always_comb begin
    eff = rq_data;
    for (int unsigned i = 0; i < MAX_OUT; i++)
      if (OW'(i) < fwd_n && fwd_addr[i] == h_addr) eff = {1'b1, fwd_tag[i]};
    if (!bq_pending)                     kind = LK_DUPLICATE;
    else if (!eff[TAG_W])                kind = LK_UNIQUE;
    else if (eff[TAG_W-1:0] == h_tag)    kind = LK_DUPLICATE;
    else                                 kind = LK_COLLISION;
  end

  always_comb begin
    can_go = bq_valid && (!bq_pending || rq_valid);
    if (kind == LK_UNIQUE)    can_go = can_go && mem_req_ready;
    if (kind == LK_COLLISION) can_go = can_go && sq_ready;
  end

  assign res_valid  = can_go;
  assign res_kind   = kind;
  assign fire       = can_go && res_ready;
  assign bq_pop     = fire;
  assign rq_pop     = fire && bq_pending;
  assign write_fire = fire && (kind == LK_UNIQUE);

  assign sq_valid = fire && (kind == LK_COLLISION);
  assign sq_state = {bq_state[STATE_W-2:0], bq_state[STATE_W-1]};
  assign sq_round = (bq_round == '1) ? bq_round : bq_round + 1'b1;

  // One request stream: reads only while no response is queued, writes only
  // while one is, so the two never coincide.
  assign mem_req_valid = read_want || write_fire;
  assign mem_req_we    = write_fire;
  assign mem_req_addr  = write_fire ? h_addr : iq_hash[ADDR_W-1:0];
  assign mem_req_wdata = {1'b1, h_tag};

  logic [OW-1:0] out_next;
  always_comb begin
    out_next = outstanding;
    if (read_fire) out_next = out_next + 1'b1;
    if (rq_pop)    out_next = out_next - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (write_fire) begin
      fwd_addr[fwd_n[FW-1:0]] <= h_addr;
      fwd_tag[fwd_n[FW-1:0]]  <= h_tag;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain       <= 1'b0;
      outstanding <= '0;
      fwd_n       <= '0;
    end else begin
      outstanding <= out_next;
      if (!drain && mem_rsp_valid) begin
        drain <= 1'b1;
      end else if (drain && out_next == '0) begin
        drain <= 1'b0;
      end
      if (drain && out_next == '0) fwd_n <= '0;
      else if (write_fire)         fwd_n <= fwd_n + 1'b1;
    end
  end

  assign ev_cam_hit   = hit_take;
  assign ev_read      = read_fire;
  assign ev_unique    = fire && kind == LK_UNIQUE;
  assign ev_table_dup = fire && bq_pending && kind == LK_DUPLICATE;
  assign ev_collision = fire && kind == LK_COLLISION;

  a_rsp_room: assert property (@(posedge clk) disable iff (!rst_n)
                               mem_rsp_valid |-> rq_count < ($bits(rq_count))'(MAX_OUT));
  a_no_rsp_unasked: assert property (@(posedge clk) disable iff (!rst_n)
                                     mem_rsp_valid |-> outstanding != '0);
endmodule
