// Power management unit of a processing tile.
//
// Holds the system timer and the frequency generator, both clocked by the
// constant maximum-frequency clock clk_sys, and the processor interface: three
// FSL input FIFOs (timer configuration, Freq, Un-gate) written in the tile
// clock domain, and one output, the timer value, brought to the tile domain by
// a two flip-flop synchronizer (the interrupt line is synchronized the same
// way). The tile clock it produces (tile_clk) clocks the processor side of the
// FIFOs and synchronizers. The structure follows the platform description.
// FIFO depth 16 is the usual FSL depth and is this implementation's choice.
// A predictable frequency switch is done by software: write the new frequency
// with time T2, write the un-gate time T1 > T2, then the gate command; the
// clock stops, the frequency changes at T2 and the clock resumes at T1.
module pmu
  import mpsoc_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic        clk_sys,
  input  logic        rst_n,
  output logic        tile_clk,
  output logic        tile_ce,
  // processor side (tile_clk domain)
  input  logic        tmr_wr,
  input  fsl_word_t   tmr_data,
  output logic        tmr_full,
  input  logic        freq_wr,
  input  fsl_word_t   freq_data,
  output logic        freq_full,
  input  logic        ungate_wr,
  input  fsl_word_t   ungate_data,
  output logic        ungate_full,
  output logic [31:0] timer_value,
  output logic        irq,
  // observation (clk_sys domain)
  output logic [31:0] sys_time,
  output logic [4:0]  n_active,
  output logic        gated,
  output logic        switch_event
);
  fsl_word_t tmr_q, freq_q, ungate_q;
  logic tmr_empty, freq_empty, ungate_empty;
  logic tmr_rd, freq_rd, ungate_rd;
  logic running, irq_sys;

  async_fifo #(.WIDTH($bits(fsl_word_t)), .DEPTH(FIFO_DEPTH)) u_tmr_fifo (
    .wclk(tile_clk), .wrst_n(rst_n), .wr_en(tmr_wr), .wdata(tmr_data), .full(tmr_full),
    .rclk(clk_sys), .rrst_n(rst_n), .rd_en(tmr_rd), .rdata(tmr_q), .empty(tmr_empty));
  async_fifo #(.WIDTH($bits(fsl_word_t)), .DEPTH(FIFO_DEPTH)) u_freq_fifo (
    .wclk(tile_clk), .wrst_n(rst_n), .wr_en(freq_wr), .wdata(freq_data), .full(freq_full),
    .rclk(clk_sys), .rrst_n(rst_n), .rd_en(freq_rd), .rdata(freq_q), .empty(freq_empty));
  async_fifo #(.WIDTH($bits(fsl_word_t)), .DEPTH(FIFO_DEPTH)) u_ungate_fifo (
    .wclk(tile_clk), .wrst_n(rst_n), .wr_en(ungate_wr), .wdata(ungate_data), .full(ungate_full),
    .rclk(clk_sys), .rrst_n(rst_n), .rd_en(ungate_rd), .rdata(ungate_q), .empty(ungate_empty));

  sys_timer u_timer (
    .clk(clk_sys), .rst_n(rst_n),
    .cfg_empty(tmr_empty), .cfg_data(tmr_q), .cfg_rd(tmr_rd),
    .value(sys_time), .running(running), .irq(irq_sys));

  freq_gen u_fgen (
    .clk(clk_sys), .rst_n(rst_n), .timer_value(sys_time),
    .freq_empty(freq_empty), .freq_data(freq_q), .freq_rd(freq_rd),
    .ungate_empty(ungate_empty), .ungate_data(ungate_q), .ungate_rd(ungate_rd),
    .ce(tile_ce), .tile_clk(tile_clk), .n_active(n_active), .gated(gated),
    .switch_event(switch_event));

  sync2ff #(.WIDTH(33)) u_sync (
    .clk(tile_clk), .rst_n(rst_n), .d({irq_sys, sys_time}), .q({irq, timer_value}));
endmodule
