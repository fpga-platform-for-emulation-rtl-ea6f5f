// Self-checking testbench of local_timer: the count must equal the number of
// clock edges since reset or since the last clear, including when the clock
// it receives has gaps (a gated clock).
// The expected count is kept by the testbench.
module tb_local_timer;
  logic clk_in = 0, rst_n = 1, en = 1, clr = 0;
  initial #1 rst_n = 0;
  always #5 clk_in = ~clk_in;
  logic gclk;
  assign gclk = clk_in & en;
  int checks = 0, failures = 0;
  logic [31:0] count;
  int edges;
  local_timer dut (.clk(gclk), .rst_n(rst_n), .clr(clr), .count(count));

  always @(posedge gclk) if (rst_n) edges <= clr ? 0 : edges + 1;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    edges = 0;
    repeat (2) @(posedge clk_in);
    #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk_in);
      checks++;
      if (count !== 32'(edges)) begin failures++; $display("FAIL k=%0d count=%0d exp=%0d", k, count, edges); end
      en  = ($urandom % 4) != 0;
      clr = (k == 150);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
