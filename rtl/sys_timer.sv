// System timer of the power management unit.
//
// A 32-bit down counter clocked by the constant maximum-frequency clock, so it
// is the wall-time reference of the tile even while the processor clock is
// scaled or gated. It is programmed through a command FIFO: a word with the
// FSL control bit clear loads the counter; a word with the control bit set
// carries the command bits run (start/stop), irq_en (interrupt enable) and
// irq_clr (acknowledge). While running, the counter decrements every cycle
// and wraps from 0 to the all-ones maximum, so after an interrupt the value
// keeps telling how long ago the interrupt happened. When it reaches zero
// with the interrupt enabled, the pending interrupt flag is set and held
// until cleared. The counting direction, the start/stop, load and interrupt
// operations follow the platform description; the command encoding and the
// sticky interrupt are choices of this implementation. Reset: stopped,
// value 0, interrupt disabled. One command is taken per cycle.
module sys_timer
  import mpsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_empty,
  input  fsl_word_t   cfg_data,
  output logic        cfg_rd,
  output logic [31:0] value,
  output logic        running,
  output logic        irq
);
  logic irq_en;
  logic [31:0] next_value;

  assign cfg_rd     = !cfg_empty;
  assign next_value = value - 32'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value   <= '0;
      running <= 1'b0;
      irq_en  <= 1'b0;
      irq     <= 1'b0;
    end else begin
      if (running) value <= next_value;
      if (running && irq_en && next_value == 32'd0) irq <= 1'b1;
      if (cfg_rd) begin
        if (!cfg_data.ctrl) begin
          value <= cfg_data.data;
        end else begin
          running <= cfg_data.data[TMR_BIT_RUN];
          irq_en  <= cfg_data.data[TMR_BIT_IRQEN];
          if (cfg_data.data[TMR_BIT_IRQCLR]) irq <= 1'b0;
        end
      end
    end
  end
endmodule
