// Self-checking testbench of ce_gen.
// For every N from 0 to 16 (D = 16) the enable sequence after a restart is
// compared cycle by cycle with a reference accumulator, and the number of
// enabled cycles per 16-cycle period must be N. A second instance with D = 8
// and N = 3 must enable exactly cycles 2, 5 and 7 of each period.
// The expected enable pattern is recomputed from the accumulator rule.
module tb_ce_gen;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] n;
  logic restart, ce;
  ce_gen #(.D(16)) dut (.clk(clk), .rst_n(rst_n), .n(n), .restart(restart), .ce(ce));

  logic [3:0] n8;
  logic restart8, ce8;
  ce_gen #(.D(8)) dut8 (.clk(clk), .rst_n(rst_n), .n(n8), .restart(restart8), .ce(ce8));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, ones;
    bit exp;
    n = 0; restart = 0; n8 = 0; restart8 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int nn = 0; nn <= 16; nn++) begin
      @(negedge clk); n = 5'(nn); restart = 1;
      acc = 0; ones = 0;
      for (int k = 0; k < 48; k++) begin
        @(posedge clk); #1;
        restart = 0;
        acc += nn;
        exp = 0;
        if (acc >= 16) begin acc -= 16; exp = 1; end
        checks++;
        if (ce !== exp) begin
          failures++;
          $display("FAIL N=%0d cycle %0d ce=%0b exp=%0b", nn, k, ce, exp);
        end
        if (k >= 16 && k < 32 && ce) ones++;
      end
      checks++;
      if (ones != nn) begin failures++; $display("FAIL N=%0d: %0d enables per period", nn, ones); end
    end
    // 3/8 example
    @(negedge clk); n8 = 4'd3; restart8 = 1;
    for (int k = 0; k < 24; k++) begin
      @(posedge clk); #1; restart8 = 0;
      checks++;
      if (ce8 !== ((k % 8) == 2 || (k % 8) == 5 || (k % 8) == 7)) begin
        failures++; $display("FAIL 3/8 cycle %0d ce=%0b", k, ce8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
