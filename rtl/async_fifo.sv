// Dual-clock FIFO with Gray-coded pointers (the FSL channels of the platform).
//
// Writes on wclk, reads on rclk; the two may be unrelated. Each pointer is
// kept in binary and Gray code, and the Gray copy is passed to the other side
// through two flip-flops, so full and empty are conservative and never wrong.
// The read side is first-word-fall-through: rdata shows the oldest word while
// empty is low, and rd_en removes it. A write while full is dropped, which
// gives the non-blocking FSL write the processing tiles use towards the
// monitor (the writer sees full and carries on). DEPTH must be a power of two, at least 4.
// Latency: a written word is visible at the read side three rclk edges later.
// Its role (clock crossing, non-blocking writes) follows the platform; the
// Gray-pointer structure and the default depth of 16 are this design's choices.
module async_fifo #(
  parameter int WIDTH = 33,
  parameter int DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_rs, rgray_ws;   // synchronized copies
  logic [AW:0] wbin_n, rbin_n;

  initial begin
    assert (DEPTH == (1 << AW)) else $error("async_fifo: DEPTH must be a power of two");
  end

  // write side
  assign wbin_n = wbin + (AW+1)'(wr_en && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= wbin_n ^ (wbin_n >> 1);
    end
  end
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  sync2ff #(.WIDTH(AW+1)) u_sync_r2w (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_ws));
  assign full = (wgray == {~rgray_ws[AW:AW-1], rgray_ws[AW-2:0]});

  // read side
  assign rbin_n = rbin + (AW+1)'(rd_en && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= rbin_n ^ (rbin_n >> 1);
    end
  end
  sync2ff #(.WIDTH(AW+1)) u_sync_w2r (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_rs));
  assign empty = (rgray == wgray_rs);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
