// Two flip-flop synchronizer.
//
// Brings a signal (or a bundle of bits) into the clock domain of clk through
// two flip-flops, giving two destination cycles of latency. It is used for the
// system timer value and interrupt going from the power management unit to the
// processor, as the platform description specifies, and for the busy toggle
// of the DMA controller. A multi-bit value sampled this way may be read while
// it changes; the processor is expected to treat the timer value as a coarse
// time reference, as the description warns. Reset clears both stages.
module sync2ff #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
