// Self-checking testbench of the shared memory tile (DTL target).
// A testbench initiator writes random bursts of 1..32 words with random
// gaps in the write data and random read back-pressure, then reads every
// burst back and compares with a shadow copy. Also checks rd_last on the last
// word of each read burst and the two-cycle latency from command accept to
// the first read word.
// Read data are checked against a shadow array in the testbench.
module tb_shared_mem_tile;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  dtl_m2s_t req;
  dtl_s2m_t rsp;
  logic busy;
  logic [31:0] shadow [1024];
  shared_mem_tile #(.AW(10)) dut (.clk(clk), .rst_n(rst_n), .dtl_i(req), .dtl_o(rsp), .busy(busy));

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_cmd(input logic [31:0] a, input logic rd, input int n);
    @(negedge clk); req.cmd_valid = 1; req.cmd_addr = a; req.cmd_read = rd; req.cmd_block_size = 8'(n - 1);
    do @(posedge clk); while (!rsp.cmd_accept);
    #1 req.cmd_valid = 0;
  endtask

  task automatic burst_write(input int w, input int n);
    send_cmd(32'(w * 4), 0, n);
    for (int i = 0; i < n; i++) begin
      logic [31:0] d = $urandom;
      @(negedge clk);
      while ($urandom % 3 == 0) begin req.wr_valid = 0; @(negedge clk); end
      req.wr_valid = 1; req.wr_data = d; req.wr_last = (i == n - 1);
      do @(posedge clk); while (!rsp.wr_accept);
      shadow[(w + i) % 1024] = d;
      #1 req.wr_valid = 0;
    end
  endtask

  task automatic burst_read(input int w, input int n, input bit stall);
    int got = 0, lat = 0;
    send_cmd(32'(w * 4), 1, n);
    while (got < n) begin
      @(negedge clk);
      req.rd_accept = stall ? ($urandom % 2) : 1'b1;
      @(posedge clk);
      if (got == 0) lat++;
      if (rsp.rd_valid && req.rd_accept) begin
        check($sformatf("read word %0d", w + got), rsp.rd_data == shadow[(w + got) % 1024]);
        check("rd_last", rsp.rd_last == (got == n - 1));
        if (got == 0 && !stall) check($sformatf("first word latency %0d", lat), lat == 2);
        got++;
      end
    end
    #1 req.rd_accept = 0;
  endtask

  int ws [20], ns [20];
  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      ws[b] = (b * 40) % 1000; ns[b] = 1 + ($urandom % 32);
      burst_write(ws[b], ns[b]);
    end
    for (int b = 0; b < 20; b++) burst_read(ws[b], ns[b], b % 2 == 1);
    check("idle at end", !busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
