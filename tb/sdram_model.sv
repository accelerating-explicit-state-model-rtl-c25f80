// sdram_model: behavioural model of one external SDRAM bank behind the
// board's memory interface (testbench only, not synthesizable).
//
// Requests (req_valid/req_ready, we, addr, wdata) are accepted when
// req_ready is high; req_ready is drawn at random each cycle with
// probability READY_PCT percent. Accepted requests take effect in order: a
// write updates the sparse storage at once, a read samples it at once and
// returns the data on rsp_valid/rsp_rdata after a random latency of
// MIN_LAT..MAX_LAT cycles, never earlier than the previous read's response,
// at most one response per cycle. Never-written words read as zero, which
// for the hash table means "empty entry".
module sdram_model #(
  parameter int unsigned ADDR_W    = 25,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned MIN_LAT   = 8,
  parameter int unsigned MAX_LAT   = 24,
  parameter int unsigned READY_PCT = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              rsp_valid,
  output logic [DATA_W-1:0] rsp_rdata
);
  logic [DATA_W-1:0] store [logic [ADDR_W-1:0]];
  longint unsigned   due_q  [$];
  logic [DATA_W-1:0] data_q [$];
  longint unsigned   now;
  longint unsigned   last_due;
  int unsigned       reads, writes;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req_ready <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      now       <= 0;
      last_due  <= 0;
      reads     <= 0;
      writes    <= 0;
    end else begin
      longint unsigned d;
      now <= now + 1;
      if (req_valid && req_ready) begin
        if (req_we) begin
          store[req_addr] = req_wdata;
          writes <= writes + 1;
        end else begin
          d = now + 64'(MIN_LAT + ($urandom % (MAX_LAT - MIN_LAT + 1)));
          if (d <= last_due) d = last_due + 1;
          last_due <= d;
          due_q.push_back(d);
          data_q.push_back(store.exists(req_addr) ? store[req_addr] : '0);
          reads <= reads + 1;
        end
      end
      if (due_q.size() > 0 && due_q[0] <= now) begin
        rsp_valid <= 1'b1;
        rsp_rdata <= data_q[0];
        void'(due_q.pop_front());
        void'(data_q.pop_front());
      end else begin
        rsp_valid <= 1'b0;
      end
      req_ready <= (($urandom % 100) < READY_PCT);
    end
  end
endmodule
