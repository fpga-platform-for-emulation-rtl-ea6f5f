// Monitor tile hardware: trace FSL links, monitor memory and local timer.
//
// The processing tiles report high-level events (task switches, FIFO
// operations, task progress) by writing trace packets into an FSL link to the
// monitor: a dual-clock FIFO of 64 words per tile, written in that tile's
// clock domain. The writes are non-blocking: a word written while the FIFO is
// full is dropped (and flagged on trace_drop), so a slow monitor never stalls
// a tile. A packet starts with a header word whose upper half is 0xFFAA and
// whose lower half is the packet type, followed by its payload words; the
// hardware passes the words unchanged. A second FSL link per tile runs from
// the monitor to the tile, used to release the tiles together after the NoC
// has been configured. The monitor processor (external) polls the trace
// links, stores the data in the monitor memory (default 32 KB) and sends it
// to the host; it time-stamps with the local timer. All ports on the monitor
// side are in the clk_sys domain. The 64-word depth follows the platform
// description; the 16-word depth of the synchronization links is this
// implementation's choice.
module monitor_tile
  import mpsoc_pkg::*;
#(
  parameter int N_TILES     = 2,
  parameter int TRACE_DEPTH = 64,
  parameter int SYNC_DEPTH  = 16,
  parameter int MEM_AW      = 13
) (
  input  logic        clk_sys,
  input  logic        rst_n,
  // tile side
  input  logic        tile_clk    [N_TILES],
  input  logic        trace_wr    [N_TILES],
  input  fsl_word_t   trace_wdata [N_TILES],
  output logic        trace_full  [N_TILES],
  output logic        trace_drop  [N_TILES],
  input  logic        sync_rd     [N_TILES],
  output fsl_word_t   sync_rdata  [N_TILES],
  output logic        sync_empty  [N_TILES],
  // monitor processor side
  input  logic        mon_trace_rd    [N_TILES],
  output fsl_word_t   mon_trace_rdata [N_TILES],
  output logic        mon_trace_empty [N_TILES],
  input  logic        mon_sync_wr     [N_TILES],
  input  fsl_word_t   mon_sync_wdata  [N_TILES],
  output logic        mon_sync_full   [N_TILES],
  input  moncpu_in_t  mon_mem_i,
  output logic [31:0] mon_mem_rdata,
  output logic [31:0] mon_time
);
  for (genvar t = 0; t < N_TILES; t++) begin : g_link
    async_fifo #(.WIDTH($bits(fsl_word_t)), .DEPTH(TRACE_DEPTH)) u_trace (
      .wclk(tile_clk[t]), .wrst_n(rst_n), .wr_en(trace_wr[t]), .wdata(trace_wdata[t]),
      .full(trace_full[t]),
      .rclk(clk_sys), .rrst_n(rst_n), .rd_en(mon_trace_rd[t]), .rdata(mon_trace_rdata[t]),
      .empty(mon_trace_empty[t]));
    assign trace_drop[t] = trace_wr[t] && trace_full[t];

    async_fifo #(.WIDTH($bits(fsl_word_t)), .DEPTH(SYNC_DEPTH)) u_sync (
      .wclk(clk_sys), .wrst_n(rst_n), .wr_en(mon_sync_wr[t]), .wdata(mon_sync_wdata[t]),
      .full(mon_sync_full[t]),
      .rclk(tile_clk[t]), .rrst_n(rst_n), .rd_en(sync_rd[t]), .rdata(sync_rdata[t]),
      .empty(sync_empty[t]));
  end

  logic [31:0] unused_b;
  tdp_ram #(.AW(MEM_AW)) u_mem (
    .clka(clk_sys), .ena(mon_mem_i.mem_en), .wea(mon_mem_i.mem_we),
    .addra(mon_mem_i.mem_addr[MEM_AW+1:2]), .dina(mon_mem_i.mem_wdata), .douta(mon_mem_rdata),
    .clkb(clk_sys), .enb(1'b0), .web(4'b0000), .addrb('0), .dinb(32'd0), .doutb(unused_b));

  local_timer u_time (.clk(clk_sys), .rst_n(rst_n), .clr(1'b0), .count(mon_time));
endmodule
