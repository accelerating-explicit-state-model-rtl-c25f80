// cam: small content addressable memory that only reports whether a key is
// present (no match address), used by the hash table lookup to drop
// duplicate hash values generated close together.
//
// Lookup is combinational: hit is high in the same cycle when lk_key equals
// the key of any valid entry. A write (wr_en with wr_key) takes two cycles,
// as in the design's CAM timing: the key is captured in the first cycle and
// stored in the second, and busy is high during the second cycle, when no
// lookup or write may be started. Entries are replaced first in, first out,
// so the CAM holds the last DEPTH keys written (the last DEPTH hash values
// that missed). The design fixes the 32-entry size and the match-only
// output; FIFO replacement and this exact two-cycle split are this
// implementation's choices. Reset empties the CAM.
module cam #(
  parameter int unsigned KEY_W = 40,
  parameter int unsigned DEPTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] lk_key,
  output logic             hit,
  input  logic             wr_en,
  input  logic [KEY_W-1:0] wr_key,
  output logic             busy
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [KEY_W-1:0] keys  [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [AW-1:0]    wr_ptr;
  logic             pend;
  logic [KEY_W-1:0] pend_key;

  always_comb begin
    hit = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (valid[i] && keys[i] == lk_key) hit = 1'b1;
  end

  assign busy = pend;

  always_ff @(posedge clk) begin
    if (pend) keys[wr_ptr] <= pend_key;
    if (wr_en && !pend) pend_key <= wr_key;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= '0;
      wr_ptr <= '0;
      pend   <= 1'b0;
    end else begin
      pend <= wr_en && !pend;
      if (pend) begin
        valid[wr_ptr] <= 1'b1;
        wr_ptr        <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
    end
  end

  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                         busy |-> !wr_en);
endmodule
