// Workload testbench: a time-slice schedule driven through one power
// management unit, as the operating system of a tile drives it.
//
// Slices are 1 ms long, 50,000 cycles of the 50 MHz system clock, which is a
// multiple of 16. Eight slices run at the eight operating-system frequency
// steps 2/16 .. 16/16 (N = 16 is written as field value 0). Then one idle
// slice gates the clock and sets the un-gate time to the start of the next
// slice, and a final slice runs at 8/16. During each slice the software sends
// the frequency word for the next slice, with T2 = start of that slice,
// through the Freq FIFO in the tile clock domain, so the FIFO latency varies
// with the tile frequency.
// Checks, for every slice: the switch happens exactly when the system timer
// equals the slice start, and the tile receives exactly N * 50000 / 16 clock
// edges. The switch cycle is the one in which the timer equals the slice
// start; the first tile clock edge of the new setting is the system clock
// edge after the one that ends it, so a slice's edges are counted from there.
// The idle slice receives only the few edges before the gate command takes
// effect, and the clock resumes exactly at T1. Everything is at default
// sizes. The slice length and the frequency steps follow the platform's
// experiments.
module tb_slice_schedule;
  import mpsoc_pkg::*;
  localparam int S      = 50000;          // cycles per slice
  localparam int NSLICE = 10;
  localparam int IDLE   = 8;              // index of the gated slice
  localparam logic [31:0] T0 = 32'h0010_0000;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #10 clk = ~clk;                  // 50 MHz
  int checks = 0, failures = 0;

  logic tile_clk, tile_ce;
  logic tmr_wr = 0, freq_wr = 0, ungate_wr = 0;
  fsl_word_t tmr_data = '0, freq_data = '0, ungate_data = '0;
  logic tmr_full, freq_full, ungate_full, irq, gated, switch_event;
  logic [31:0] timer_value, sys_time;
  logic [4:0] n_active;
  pmu dut (.clk_sys(clk), .*);

  int n_of [NSLICE];
  int tedges = 0;
  always @(posedge tile_clk) tedges++;

  function automatic logic [31:0] slice_start(input int k);
    return T0 - 32'(k * S);
  endfunction

  // Edge count taken at the end of each slice start cycle.
  int start_edges [NSLICE+1];
  int switch_seen [NSLICE];
  int ungate_at = -1;
  initial begin
    for (int k = 0; k < NSLICE; k++) switch_seen[k] = 0;
  end
  always @(posedge clk) begin
    for (int k = 0; k <= NSLICE; k++)
      if (sys_time == slice_start(k)) begin
        fork
          automatic int kk = k;
          #1 start_edges[kk] = tedges;
        join_none
      end
    if (switch_event)
      for (int k = 0; k < NSLICE; k++)
        if (sys_time == slice_start(k) - 32'd1) switch_seen[k]++;
  end
  always @(negedge gated) ungate_at = int'(sys_time);

  initial begin
    #(64'(NSLICE + 3) * S * 20); failures++;
    $display("watchdog");
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
  // Frequency word: N in bits [3:0] (16 written as 0), T2 in bits [31:4].
  function automatic logic [31:0] fword(input int n, input logic [31:0] t2);
    return {t2[31:4], 4'(n % 16)};
  endfunction

  initial begin
    int got, want;
    for (int k = 0; k < 8; k++) n_of[k] = 2 * (k + 1);
    n_of[IDLE] = 0;
    n_of[9]    = 8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fsl_tmr(0, T0 + 32'd2000);
    fsl_tmr(1, 32'b001);                    // run
    fsl_freq(0, fword(n_of[0], slice_start(0)));
    for (int k = 0; k < NSLICE; k++) begin
      wait (sys_time == slice_start(k) - 32'd5);
      if (k == IDLE) begin
        // idle slice: next frequency, un-gate at the next slice start, gate
        fsl_freq(0, fword(n_of[k+1], slice_start(k+1)));
        fsl_ungate(slice_start(k+1));
        fsl_freq(1, 32'd0);
      end else if (k + 1 < NSLICE && k + 1 != IDLE) begin
        fsl_freq(0, fword(n_of[k+1], slice_start(k+1)));
      end
    end
    wait (sys_time == slice_start(NSLICE) - 32'd10);

    for (int k = 0; k < NSLICE; k++) begin
      got = start_edges[k+1] - start_edges[k];
      if (k == IDLE) begin
        check($sformatf("idle slice gets only the edges before the gate (%0d)", got), got < 16);
      end else begin
        want = n_of[k] * S / 16;
        check($sformatf("slice %0d at %0d/16: %0d edges, expected %0d", k, n_of[k], got, want), got == want);
      end
      if (k != IDLE)
        check($sformatf("slice %0d switch at its start time", k), switch_seen[k] == 1);
    end
    check("clock resumed exactly at T1", ungate_at == int'(slice_start(IDLE + 1)) - 1);
    check("no FIFO overflow", !tmr_full && !freq_full && !ungate_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
