// unvisited_queue: first-in first-out queue of unvisited states kept in an
// external SDRAM bank, with an on-chip bottom buffer (write end) and top
// buffer (read end).
//
// New unique states enter the bottom buffer; the next state generator takes
// states from the top buffer. While the part of the queue in SDRAM is empty
// and no read from it is in flight, states move straight from the bottom to
// the top buffer. Otherwise states from the bottom buffer are written to
// SDRAM (spill), which is used as a circular buffer of 2**MEM_ADDR_W words,
// and read back into the top buffer (fill) while the top buffer has room for
// the reads in flight. This keeps strict FIFO order. Writes win the single
// request port when the bottom buffer is at least half full, reads otherwise.
//
// Interface: push_*/pop_* ready/valid; memory request channel mem_req_*
// (valid/ready, one request per accepted cycle) and in-order read response
// mem_rsp_* without back-pressure; empty is high only when no state is held
// anywhere (buffers, SDRAM, reads in flight). The top/bottom structure and
// SDRAM residence follow the design; buffer depths, the circular layout and
// the request priority are this implementation's choices.
module unvisited_queue #(
  parameter int unsigned STATE_W    = 18,
  parameter int unsigned BUF_DEPTH  = 512,
  parameter int unsigned MEM_ADDR_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  push_valid,
  output logic                  push_ready,
  input  logic [STATE_W-1:0]    push_state,
  output logic                  pop_valid,
  input  logic                  pop_ready,
  output logic [STATE_W-1:0]    pop_state,
  output logic                  mem_req_valid,
  input  logic                  mem_req_ready,
  output logic                  mem_req_we,
  output logic [MEM_ADDR_W-1:0] mem_req_addr,
  output logic [STATE_W-1:0]    mem_req_wdata,
  input  logic                  mem_rsp_valid,
  input  logic [STATE_W-1:0]    mem_rsp_rdata,
  output logic                  empty,
  output logic                  ev_spill,
  output logic                  ev_fill
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned MW = MEM_ADDR_W + 1;

  logic               bot_valid, bot_pop, top_ready, top_push;
  logic [STATE_W-1:0] bot_state, top_data;
  logic [CW-1:0]      bot_count, top_count;
  logic [MEM_ADDR_W-1:0] wr_addr, rd_addr;
  logic [MW-1:0]      mcount;
  logic [CW-1:0]      inflight;
  logic               bypass, read_want, write_want, prefer_write, use_read;
  logic               read_fire, write_fire;

  phast_fifo #(.W(STATE_W), .DEPTH(BUF_DEPTH)) u_bottom (
    .clk, .rst_n,
    .push_valid(push_valid), .push_ready(push_ready), .push_data(push_state),
    .pop_valid(bot_valid), .pop_ready(bot_pop), .pop_data(bot_state), .count(bot_count));

  phast_fifo #(.W(STATE_W), .DEPTH(BUF_DEPTH)) u_top (
    .clk, .rst_n,
    .push_valid(top_push), .push_ready(top_ready), .push_data(top_data),
    .pop_valid(pop_valid), .pop_ready(pop_ready), .pop_data(pop_state), .count(top_count));

  assign bypass       = bot_valid && mcount == '0 && inflight == '0 && top_ready;
  assign read_want    = mcount != '0 && ({1'b0, top_count} + {1'b0, inflight}) < (CW + 1)'(BUF_DEPTH);
  assign write_want   = bot_valid && !bypass && mcount < MW'(2 ** MEM_ADDR_W);
  assign prefer_write = bot_count >= CW'(BUF_DEPTH / 2);
  assign use_read     = read_want && !(write_want && prefer_write);

  assign mem_req_valid = read_want || write_want;
  assign mem_req_we    = !use_read;
  assign mem_req_addr  = use_read ? rd_addr : wr_addr;
  assign mem_req_wdata = bot_state;
  assign read_fire     = mem_req_ready && use_read;
  assign write_fire    = mem_req_ready && write_want && !use_read;

  assign bot_pop  = bypass || write_fire;
  assign top_push = bypass || mem_rsp_valid;
  assign top_data = mem_rsp_valid ? mem_rsp_rdata : bot_state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_addr  <= '0;
      rd_addr  <= '0;
      mcount   <= '0;
      inflight <= '0;
    end else begin
      if (write_fire) wr_addr <= wr_addr + 1'b1;
      if (read_fire)  rd_addr <= rd_addr + 1'b1;
      case ({write_fire, read_fire})
        2'b10:   mcount <= mcount + 1'b1;
        2'b01:   mcount <= mcount - 1'b1;
        default: mcount <= mcount;
      endcase
      case ({read_fire, mem_rsp_valid})
        2'b10:   inflight <= inflight + 1'b1;
        2'b01:   inflight <= inflight - 1'b1;
        default: inflight <= inflight;
      endcase
    end
  end

  assign empty    = !bot_valid && !pop_valid && mcount == '0 && inflight == '0;
  assign ev_spill = write_fire;
  assign ev_fill  = read_fire;

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   mem_rsp_valid |-> inflight != '0);
  a_no_bypass_with_rsp: assert property (@(posedge clk) disable iff (!rst_n)
                                         mem_rsp_valid |-> !bypass);
endmodule
