// Self-checking testbench of freq_gen with a modelled down-counting system
// timer. Checks: full speed after reset; a new N written with effective time
// T2 takes effect exactly when the timer shows T2 (not when it is written),
// after which every 16-cycle window holds N enabled cycles in the pattern of
// the reference accumulator; a gate command stops the enable at once and the
// un-gate time T1 restarts it the cycle after the timer shows T1; field value
// 0 selects N = 16; the gated tile clock has one rising edge per enable.
// Switch and gate times are checked against the T2/T1 rule of the platform.
module tb_freq_gen;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] timer_value;
  logic freq_empty, freq_rd, ungate_empty, ungate_rd;
  fsl_word_t freq_data, ungate_data;
  logic ce, tile_clk, gated, switch_event;
  logic [4:0] n_active;
  freq_gen dut (.*);

  always @(posedge clk) timer_value <= rst_n ? timer_value - 1 : 32'd5000;

  int tclk_edges = 0, ce_seen = 0;
  always @(posedge tile_clk) tclk_edges++;
  always @(posedge clk) if (rst_n && ce) ce_seen++;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0d", what, timer_value); end
  endtask

  task automatic push_freq(input logic ctrl, input logic [31:0] d);
    @(negedge clk); freq_empty = 0; freq_data = '{ctrl: ctrl, data: d};
    @(negedge clk); freq_empty = 1;
  endtask
  task automatic push_ungate(input logic [31:0] d);
    @(negedge clk); ungate_empty = 0; ungate_data = '{ctrl: 1'b0, data: d};
    @(negedge clk); ungate_empty = 1;
  endtask

  // count enables over n cycles, sampled after each edge
  task automatic count_ce(input int n, output int c);
    c = 0;
    repeat (n) begin @(posedge clk); #1 if (ce) c++; end
  endtask

  initial begin
    int c, acc, e0, e1;
    logic [31:0] t2, t1;
    bit exp;
    freq_empty = 1; ungate_empty = 1; freq_data = '0; ungate_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    count_ce(32, c);
    check("full speed after reset", c == 32);

    // N = 6, effective at an aligned time ahead
    t2 = ((timer_value - 32'd100) & ~32'hF);
    push_freq(0, t2 | 32'd6);
    count_ce(16, c);
    check("old N until T2", c == 16 && n_active == 5'd16);
    wait (timer_value == t2 + 1);
    @(posedge clk); #1;       // timer now shows T2, switch registered at the next edge
    check("T2 reached", timer_value == t2);
    @(posedge clk); #1;
    check("switched at T2", n_active == 5'd6 && switch_event);
    // cycle evaluated with timer == T2 starts the new period with acc = 0
    acc = 6; exp = 0;
    check("first cycle of new period", ce == 1'b0);
    e0 = tclk_edges;
    for (int k = 1; k < 64; k++) begin
      @(posedge clk); #1;
      acc += 6; exp = 0;
      if (acc >= 16) begin acc -= 16; exp = 1; end
      check($sformatf("N=6 pattern cycle %0d", k), ce == exp);
    end
    count_ce(16, c);
    check("6 of 16", c == 6);
    @(negedge clk);
    e1 = tclk_edges;
    check("tile_clk edges == enables", tclk_edges == ce_seen);

    // gate and un-gate
    t1 = timer_value - 32'd60;
    push_ungate(t1);
    push_freq(1, 32'h0);
    #1;
    check("gated", gated == 1);
    count_ce(20, c);
    check("no enable while gated", c == 0);
    e0 = tclk_edges;
    wait (timer_value == t1);
    @(posedge clk); #1;
    check("ungated after T1", gated == 0);
    count_ce(32, c);
    check("6/16 after ungate", c == 12);
    // field 0 selects N = 16
    t2 = ((timer_value - 32'd64) & ~32'hF);
    push_freq(0, t2);
    wait (n_active == 5'd16);
    count_ce(32, c);
    check("N field 0 = full speed", c == 32);
    check("tile_clk edges == enables at end", tclk_edges == ce_seen && ce_seen > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
