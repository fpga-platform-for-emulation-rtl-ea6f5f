// Clock-enable generator for an N/D fraction of the input clock.
//
// Every input cycle an accumulator adds N; when it reaches D, D is subtracted
// and the cycle is enabled. This spreads N enabled cycles as evenly as
// possible over every D input cycles (for N = 3, D = 8 the enabled cycles are
// 2, 5 and 7 of each period), which is the clock generation algorithm of the
// platform. The decision for input cycle k is registered at the end of cycle
// k, so ce is high during the cycle after the one the algorithm evaluated:
// a latency of one cycle that this implementation adds. `restart` clears the
// accumulator so that a new N starts on a period boundary (own choice).
// N = D gives an enable every cycle, N = 0 never.
module ce_gen #(
  parameter int D = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(D+1)-1:0] n,
  input  logic                 restart,
  output logic                 ce
);
  localparam int AW = $clog2(2*D+1);
  logic [AW-1:0] acc, sum;

  assign sum = (restart ? '0 : acc) + AW'(n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ce  <= 1'b0;
    end else if (sum >= AW'(D)) begin
      acc <= sum - AW'(D);
      ce  <= 1'b1;
    end else begin
      acc <= sum;
      ce  <= 1'b0;
    end
  end
endmodule
