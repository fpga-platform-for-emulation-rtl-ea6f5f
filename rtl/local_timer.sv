// Local timer: counts the cycles of the clock it is given.
//
// On a processing tile it is clocked by the tile clock, so it counts the
// cycles the processor actually received (the scaled and gated clock), in
// contrast to the system timer that counts wall time. On the monitor tile it
// time-stamps trace data. 32 bits, wraps around; clr restarts it from 0 on
// the next edge. Width and clear input are choices of this implementation.
module local_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  output logic [31:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else          count <= count + 32'd1;
  end
endmodule
