// tb_cam: writes keys and looks them up. Checks that a written key hits
// from the third cycle on (two-cycle write), that busy is high in the second
// write cycle, that unwritten keys miss, and that with first-in first-out
// replacement only the last DEPTH written keys hit.
module tb_cam;
  localparam int unsigned KEY_W = 40, DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [KEY_W-1:0] lk_key, wr_key;
  logic hit, wr_en, busy;
  int checks = 0, failures = 0;
  logic [KEY_W-1:0] written [$];

  cam #(.KEY_W(KEY_W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [KEY_W-1:0] key_of(int i);
    return {8'(i * 7 + 3), 32'(i) * 32'h9E37_79B9};
  endfunction

  task automatic write_key(logic [KEY_W-1:0] k);
    wr_en = 1; wr_key = k; lk_key = k;
    #1 check(!busy, "not busy at write start");
    @(posedge clk);
    #1;
    wr_en = 0;
    #1 check(busy, "busy in second write cycle");
    @(posedge clk);
    #1;
    #1 check(!busy, "idle after write");
    written.push_back(k);
    if (written.size() > DEPTH) void'(written.pop_front());
  endtask

  initial begin
    wr_en = 0; wr_key = '0; lk_key = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    @(posedge clk);
    #1;
    lk_key = key_of(0);
    #1 check(!hit, "empty CAM misses");
    for (int i = 0; i < 80; i++) begin
      write_key(key_of(i));
      lk_key = key_of(i);
      #1 check(hit, "key hits after its write");
      // the key written DEPTH writes ago is gone, the one DEPTH-1 ago is not
      if (i >= DEPTH) begin
        lk_key = key_of(i - DEPTH);
        #1 check(!hit, "evicted key misses");
      end
      if (i >= DEPTH - 1) begin
        lk_key = key_of(i - DEPTH + 1);
        #1 check(hit, "oldest kept key hits");
      end
      lk_key = key_of(i + 1000);
      #1 check(!hit, "unwritten key misses");
    end
    foreach (written[j]) begin
      lk_key = written[j];
      #1 check(hit, "all last DEPTH keys hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    #1;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
