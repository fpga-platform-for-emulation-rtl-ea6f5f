// Glitch-free clock gate.
//
// The enable is captured on the falling edge of the input clock and ANDed with
// the clock, so the output only carries whole high phases of the input clock:
// the same job a global clock buffer with clock enable does on an FPGA. An
// enable that is high during input cycle k (it is sampled at the falling edge)
// lets the rising edge of cycle k+1 through. Reset holds the output low.
// Gating the tile clock follows the platform; the falling-edge enable flop is
// this design's way of doing it glitch-free.
module clk_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);
  logic en_n;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_n <= 1'b0;
    else        en_n <= en;
  end

  assign gclk = clk & en_n;
endmodule
