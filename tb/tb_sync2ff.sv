// Self-checking testbench of sync2ff: random words must appear at the output
// exactly two clock edges after they are applied, and reset clears the output.
// The expected output is the input delayed by two clock edges.
module tb_sync2ff;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] d, q;
  logic [7:0] hist [3];
  sync2ff #(.WIDTH(8)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 8'hA5;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      if (k >= 3) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("FAIL k=%0d q=%h exp=%h", k, q, hist[1]); end
      end
      d = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
