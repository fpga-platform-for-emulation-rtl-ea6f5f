// Self-checking testbench of sys_timer, fed through its command port.
// Checks: load, hold while stopped, one decrement per cycle while running,
// stop, wrap from 0 to the maximum value, interrupt set on reaching zero
// only when enabled, and interrupt clear.
module tb_sys_timer;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic cfg_empty, cfg_rd, running, irq;
  fsl_word_t cfg_data;
  logic [31:0] value;
  sys_timer dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic ctrl, input logic [31:0] d);
    @(negedge clk); cfg_empty = 0; cfg_data = '{ctrl: ctrl, data: d};
    @(negedge clk); cfg_empty = 1;
  endtask
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (value=%0d irq=%0b)", what, value, irq); end
  endtask

  initial begin
    logic [31:0] v0;
    cfg_empty = 1; cfg_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(0, 32'd100);
    check("load", value == 32'd100);
    repeat (5) @(negedge clk);
    check("hold while stopped", value == 32'd100);
    send(1, 32'b001);            // run, irq disabled
    v0 = value;
    repeat (10) @(negedge clk);
    check("10 decrements", value == v0 - 32'd10);
    send(1, 32'b000);            // stop
    v0 = value;
    repeat (7) @(negedge clk);
    check("stop", value == v0);
    send(0, 32'd5);
    send(1, 32'b001);
    repeat (10) @(negedge clk);
    check("no irq when disabled", irq == 0);
    check("wrapped", value > 32'hFFFF_FF00);
    send(0, 32'd20);
    send(1, 32'b011);            // run with irq
    v0 = value;
    // the counter reaches 0 after v0 cycles
    repeat (int'(v0) - 2) @(negedge clk);
    check("irq not early", irq == 0);
    repeat (3) @(negedge clk);
    check("irq at zero", irq == 1);
    repeat (10) @(negedge clk);
    check("irq sticky", irq == 1);
    send(1, 32'b111);            // clear, keep running and enabled
    check("irq cleared", irq == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
