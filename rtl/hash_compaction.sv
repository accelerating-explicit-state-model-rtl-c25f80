// hash_compaction: pipelined XOR-tree hash of a full state.
//
// Each bit b of the HASH_W-bit hash value is the XOR of the state bits i for
// which hash matrix entry M[i][b] is set (column b of the matrix selects the
// tree inputs). All hash bits are computed in parallel, one state per cycle,
// which is how the design replaces the software method of reading one
// matrix row per set state bit. The trees are built from FANIN-input XOR
// nodes with a register after every tree level, so the latency is
// 1 + tree_levels(STATE_W + REHASH_W, FANIN) cycles (input register plus levels); for
// the 18-bit DOWN state and FANIN 6 that is 3 cycles (22 inputs, 2 levels). The matrix comes from
// phast_pkg::hash_matrix_bit with parameter SEED.
//
// Collision reintroduction: when in_coll is set, the state arriving from the
// enqueue stage is an original collided state; the hash is then computed on
// the matching shifted state read (popped) from the shifted collision queue
// (sq_*), not on the original. out_state carries the state actually hashed
// (out_state, out_round) so that the hash table lookup can shift it again
// if it collides again. The shifted queue also holds the rehash round k
// (how often the state was shifted), and k enters the XOR trees as REHASH_W
// extra inputs (matrix rows STATE_W and up). The hash is linear, so without
// k a state shifted k times would hash exactly like any state equal to it,
// e.g. an ordinary state or another state shifted fewer times, and be
// dropped as its duplicate; with k, (k, s) pairs only meet when equal. The
// round input is this implementation's addition to the design's scheme.
//
// Handshake: in_valid/in_ready and out_valid/out_ready; the whole pipeline
// holds while its last stage is full and not accepted. in_ready also waits
// for the shifted queue when in_coll is set. FANIN, the register placement
// and the seed function are this implementation's choices.
module hash_compaction
  import phast_pkg::*;
#(
  parameter int unsigned STATE_W = 18,
  parameter int unsigned HASH_W  = 40,
  parameter int unsigned FANIN   = 6,
  parameter int unsigned SEED    = 32'h5EED_0001
) (
  input  logic               clk,
  input  logic               rst_n,
  // from enqueue
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [STATE_W-1:0] in_state,
  input  logic               in_coll,
  // shifted collision queue (pop side)
  input  logic                sq_valid,
  output logic                sq_pop,
  input  logic [STATE_W-1:0]  sq_state,
  input  logic [REHASH_W-1:0] sq_round,
  // to hash table lookup
  output logic               out_valid,
  input  logic               out_ready,
  output logic [HASH_W-1:0]  out_hash,
  output logic [STATE_W-1:0] out_state,
  output logic [REHASH_W-1:0] out_round
);
  // Tree inputs: the state plus the rehash round number of a shifted
  // collision state (matrix rows STATE_W and up; zero for an original).
  localparam int unsigned IN_W   = STATE_W + REHASH_W;
  localparam int unsigned LEVELS = tree_levels(IN_W, FANIN);
  localparam int unsigned NODES  = (IN_W + FANIN - 1) / FANIN;

  // Column masks of the hash matrix, one IN_W-bit mask per hash bit.
  function automatic logic [IN_W-1:0] column_mask(int unsigned col);
    logic [IN_W-1:0] m;
    for (int unsigned r = 0; r < IN_W; r++) m[r] = hash_matrix_bit(r, col, SEED);
    return m;
  endfunction

  // Number of live nodes on tree level l (level 0 = masked state bits).
  function automatic int unsigned level_width(int unsigned l);
    int unsigned w;
    w = IN_W;
    for (int unsigned k = 0; k < l; k++) w = (w + FANIN - 1) / FANIN;
    return w;
  endfunction

  logic                 adv;                      // pipeline advances
  logic [LEVELS:0]      vld;                      // stage valid bits
  logic [STATE_W-1:0]   st   [LEVELS+1];          // state carried along
  logic [REHASH_W-1:0]  rnd  [LEVELS+1];          // rehash round carried along
  logic [NODES-1:0]     tree [LEVELS][HASH_W];    // registered tree nodes
  logic                 take;

  assign adv      = !vld[LEVELS] || out_ready;
  assign in_ready = adv && (!in_coll || sq_valid);
  assign take     = in_valid && in_ready;
  assign sq_pop   = take && in_coll;

  // Stage 0: choose the original or the shifted state.
  always_ff @(posedge clk) begin
    if (adv) begin
      st[0] <= in_coll ? sq_state : in_state;
      rnd[0] <= in_coll ? sq_round : '0;
    end
  end

  // Tree levels 1..LEVELS, each registered.
  always_ff @(posedge clk) begin
    if (adv) begin
      for (int unsigned b = 0; b < HASH_W; b++) begin
        logic [IN_W-1:0] masked;
        masked = {rnd[0], st[0]} & column_mask(b);
        for (int unsigned j = 0; j < NODES; j++) begin
          logic x;
          x = 1'b0;
          for (int unsigned k = 0; k < FANIN; k++)
            if (j * FANIN + k < IN_W) x ^= masked[j * FANIN + k];
          tree[0][b][j] <= x;
        end
        for (int unsigned l = 1; l < LEVELS; l++) begin
          for (int unsigned j = 0; j < NODES; j++) begin
            logic x;
            x = 1'b0;
            if (j < level_width(l + 1))
              for (int unsigned k = 0; k < FANIN; k++)
                if (j * FANIN + k < level_width(l)) x ^= tree[l-1][b][j * FANIN + k];
            tree[l][b][j] <= x;
          end
        end
      end
      for (int unsigned l = 1; l <= LEVELS; l++) begin
        st[l]  <= st[l-1];
        rnd[l] <= rnd[l-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else if (adv) vld <= {vld[LEVELS-1:0], take};
  end

  always_comb begin
    for (int unsigned b = 0; b < HASH_W; b++) out_hash[b] = tree[LEVELS-1][b][0];
  end
  assign out_valid = vld[LEVELS];
  assign out_state = st[LEVELS];
  assign out_round = rnd[LEVELS];

endmodule
