// Self-checking testbench of the power management unit, driven like the
// processor would drive it through its three FSL ports (tile clock domain).
// It performs the predictable frequency switch: set the new frequency with
// effective time T2, set the un-gate time T1, gate the clock. Checks: the
// tile clock stops, the frequency changes at T2 while gated, the clock
// resumes when the system timer reaches T1 and then runs at N/16; the timer
// interrupt reaches the tile side; the timer value read on the tile side
// trails the wall time by a few cycles only.
// Edge counts are checked against N/16 of the system clock.
module tb_pmu;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tile_clk, tile_ce;
  logic tmr_wr = 0, freq_wr = 0, ungate_wr = 0;
  fsl_word_t tmr_data = '0, freq_data = '0, ungate_data = '0;
  logic tmr_full, freq_full, ungate_full, irq, gated, switch_event;
  logic [31:0] timer_value, sys_time;
  logic [4:0] n_active;
  pmu dut (.clk_sys(clk), .*);

  int tedges = 0;
  always @(posedge tile_clk) tedges++;

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s sys_time=%0d", what, sys_time); end
  endtask

  task automatic fsl_tmr(input logic ctrl, input logic [31:0] d);
    @(negedge tile_clk); tmr_wr = 1; tmr_data = '{ctrl: ctrl, data: d};
    @(posedge tile_clk); #1 tmr_wr = 0;
  endtask
  task automatic fsl_freq(input logic ctrl, input logic [31:0] d);
    @(negedge tile_clk); freq_wr = 1; freq_data = '{ctrl: ctrl, data: d};
    @(posedge tile_clk); #1 freq_wr = 0;
  endtask
  task automatic fsl_ungate(input logic [31:0] d);
    @(negedge tile_clk); ungate_wr = 1; ungate_data = '{ctrl: 1'b0, data: d};
    @(posedge tile_clk); #1 ungate_wr = 0;
  endtask

  initial begin
    logic [31:0] t2, t1, diff;
    int e0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fsl_tmr(0, 32'd100000);
    fsl_tmr(1, 32'b001);                     // run
    repeat (20) @(posedge clk);
    check("timer runs", sys_time < 32'd100000 && sys_time > 32'd99900);
    // tile-side read of the timer trails wall time by a few cycles
    @(posedge tile_clk); #1;
    diff = timer_value - sys_time;
    check("timer value synchronized", diff >= 1 && diff <= 3);

    // predictable frequency switch to 4/16
    t2 = (sys_time - 32'd200) & ~32'hF;
    t1 = t2 - 32'd64;
    fsl_freq(0, t2 | 32'd4);
    fsl_ungate(t1);
    fsl_freq(1, 32'd0);                       // gate
    repeat (6) @(posedge clk);
    check("gated", gated == 1);
    e0 = tedges;
    wait (sys_time == t2 - 1);
    check("no tile clock while gated", tedges == e0);
    check("frequency switched at T2 while gated", n_active == 5'd4);
    wait (sys_time == t1 + 1);
    check("still no tile clock before T1", tedges == e0);
    wait (gated == 0);
    check("ungated at T1", sys_time == t1 - 1);
    #1 e0 = tedges;
    repeat (160) @(posedge clk);
    #1;
    check($sformatf("runs at 4/16 after switch (%0d edges)", tedges - e0), tedges - e0 == 40);

    // timer interrupt
    fsl_tmr(0, 32'd50);
    fsl_tmr(1, 32'b011);                     // run + irq enable
    check("no irq yet", irq == 0);
    repeat (80) @(posedge clk);
    check("irq reached the tile", irq == 1);
    fsl_tmr(1, 32'b111);                     // clear
    repeat (12) @(posedge clk);
    check("irq cleared", irq == 0);
    check("no FIFO full", !tmr_full && !freq_full && !ungate_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
