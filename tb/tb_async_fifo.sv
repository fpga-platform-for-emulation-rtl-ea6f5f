// Self-checking testbench of async_fifo: a writer and a reader on unrelated
// clocks move 2000 random words with random stalls; the order and content
// must be preserved. Then the reader stops, the writer must see full after
// DEPTH words, further words must be dropped (non-blocking write), and the
// reader must get exactly the first DEPTH words.
// Expected data come from a queue model in the testbench, not from the FIFO.
module tb_async_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;
  int checks = 0, failures = 0;
  logic wr_en, rd_en, full, empty;
  logic [32:0] wdata, rdata;
  logic [32:0] q [$];
  int nread;
  async_fifo #(.WIDTH(33), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst_n(rst_n), .wr_en(wr_en), .wdata(wdata), .full(full),
    .rclk(rclk), .rrst_n(rst_n), .rd_en(rd_en), .rdata(rdata), .empty(empty));

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic rd_go;
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++;
      nread++;
      if (q.size() == 0 || rdata !== q[0]) begin
        failures++; $display("FAIL read %h exp %h", rdata, q.size() ? q[0] : 33'h0);
      end
      if (q.size()) void'(q.pop_front());
    end
  end
  always @(negedge rclk) rd_en <= rd_go && ($urandom % 3 != 0);

  initial begin
    wr_en = 0; wdata = 0; rd_go = 0; rd_en = 0; nread = 0;
    repeat (3) @(posedge wclk);
    rst_n = 1;
    rd_go = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge wclk);
      wr_en = ($urandom % 2 == 0);
      wdata = {1'($urandom), $urandom};
      #1;
      if (wr_en && !full) q.push_back(wdata);
      @(posedge wclk); #1 wr_en = 0;
    end
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty at end"); end
    // overflow: reader stopped
    rd_go = 0;
    repeat (4) @(posedge rclk);
    for (int i = 0; i < DEPTH + 5; i++) begin
      @(negedge wclk); wr_en = 1; wdata = 33'(i);
      #1;
      if (i < DEPTH) begin
        checks++;
        if (full) begin failures++; $display("FAIL full early at %0d", i); end
        q.push_back(wdata);
      end else begin
        checks++;
        if (!full) begin failures++; $display("FAIL not full at %0d", i); end
      end
      @(posedge wclk); #1 wr_en = 0;
    end
    nread = 0;
    rd_go = 1;
    repeat (200) @(posedge rclk);
    checks++;
    if (nread != DEPTH || q.size() != 0) begin failures++; $display("FAIL after overflow read %0d", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
