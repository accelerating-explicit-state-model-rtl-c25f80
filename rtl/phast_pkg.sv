// phast_pkg: types and constants shared by the PHAST verifier blocks.
//
// PHAST explores the reachable state graph of a model breadth first. Every
// generated state is hashed (hash compaction), the hash is split into a table
// address (low bits) and a tag (high bits), and the hash table lookup decides
// whether the state is new, a duplicate, or a collision (another state's tag
// already occupies the address). This package holds the lookup verdict type
// and the pseudo-random hash matrix used by the compaction XOR trees.
//
// The hash matrix is random per model, as the design prescribes; here it is a
// fixed integer mixing function of (row, column, seed) so that the XOR trees
// are constants at elaboration time and no table file is needed:
//   x = row*0x9E3779B1 ^ col*0x85EBCA77 ^ seed
//   x ^= x>>15; x *= 0x2C1B3C6D; x ^= x>>12; x *= 0x297A2D39; x ^= x>>15
//   bit = x[0]
package phast_pkg;

  // Width of the rehash round number carried with a shifted collision
  // state (0 = original state). It saturates at 2**REHASH_W-1.
  localparam int unsigned REHASH_W = 4;

  // Verdict of the hash table lookup for one state.
  typedef enum logic [1:0] {
    LK_UNIQUE    = 2'd0,  // address was empty: hash stored, state is new
    LK_DUPLICATE = 2'd1,  // hash found (CAM hit or matching table tag)
    LK_COLLISION = 2'd2   // address holds a different tag: rehash needed
  } lookup_e;

  // Run statistics kept by the top level (all saturate at 2**32-1).
  typedef struct packed {
    logic [31:0] generated;   // states offered by the next state generator
    logic [31:0] cam_hits;    // duplicates removed by the CAM
    logic [31:0] table_reads; // hash table reads issued
    logic [31:0] uniques;     // new states written to the unvisited queue
    logic [31:0] table_dups;  // duplicates found in the hash table
    logic [31:0] collisions;  // collisions (states reintroduced)
    logic [31:0] uq_spills;   // unvisited states written to SDRAM
    logic [31:0] uq_fills;    // unvisited states read back from SDRAM
    logic [31:0] violations;  // generated states that break the property
    logic [31:0] cycles;      // cycles from start to done or stop
  } phast_stats_t;

  // One bit of the hash matrix: does state bit `row` feed hash bit `col`.
  function automatic logic hash_matrix_bit(int unsigned row, int unsigned col,
                                           int unsigned seed);
    logic [31:0] x;
    x = (row * 32'h9E37_79B1) ^ (col * 32'h85EB_CA77) ^ seed;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x[0];
  endfunction

  // Number of registered XOR-tree levels needed to reduce n inputs with
  // gates of the given fan-in (at least one level).
  function automatic int unsigned tree_levels(int unsigned n, int unsigned fanin);
    int unsigned lv;
    int unsigned w;
    lv = 0;
    w  = n;
    do begin
      w  = (w + fanin - 1) / fanin;
      lv = lv + 1;
    end while (w > 1);
    return lv;
  endfunction

endpackage
