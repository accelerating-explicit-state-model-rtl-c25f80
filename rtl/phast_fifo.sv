// phast_fifo: synchronous first-in first-out buffer of W-bit words.
//
// Used for the on-chip state queues of the verifier: the lookup pending
// queue (states waiting for their hash table verdict), the collision queue
// (original states whose hash collided), the shifted collision queue (the
// shifted copies that are rehashed), the top and bottom buffers of the
// unvisited queue, and the internal queues of the hash table lookup.
// The queues are named by the design; their depths and this ready/valid
// handshake are this implementation's choice.
//
// Interface: push side push_valid/push_ready/push_data, pop side
// pop_valid/pop_ready/pop_data (first-word fall-through: pop_data shows the
// head whenever pop_valid is high). A word pushed in cycle t can be popped
// in cycle t+1. count gives the occupancy. Reset (active low, synchronous)
// empties the queue. Storage is a plain array that maps to block or
// distributed RAM.
module phast_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_valid,
  output logic                       push_ready,
  input  logic [W-1:0]               push_data,
  output logic                       pop_valid,
  input  logic                       pop_ready,
  output logic [W-1:0]               pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_push, do_pop;

  assign push_ready = (count < ($clog2(DEPTH+1))'(DEPTH));
  assign pop_valid  = (count != '0);
  assign pop_data   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
