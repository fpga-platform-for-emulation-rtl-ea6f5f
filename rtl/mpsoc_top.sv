// Dual processing tile MPSoC emulation platform (top level).
//
// Instantiates the platform of the dual-tile configuration: N_TILES
// processing tiles, each with its power management unit, memories and one
// outgoing NoC connection through a connection DMA controller; the monitor
// tile with its trace and synchronization FSL links to every tile; and the
// shared memory tile. The processor cores, the network on chip and the
// monitor processor are not part of this RTL, so their signals are ports:
//   * cpu_i/cpu_o[t], tile_clk[t]: the core of tile t (clock it by tile_clk);
//   * tile_dtl_o/i[t]: the initiator port of tile t's connection, to the NoC;
//   * mem_dtl_i/o: the target port of the shared memory tile, from the NoC;
//   * mon_*: the monitor processor's side of the FSL links and its memory.
// All clk_sys ports are in the single maximum-frequency clock domain of the
// NoC, monitor and memory tiles; cpu ports of tile t are in tile_clk[t].
// Defaults: 2 tiles, 32 KB instruction and data memory per tile, 16 KB
// shared memory, 32 KB monitor memory, 32-word DTL bursts.
// The tile set and memory sizes follow the dual-tile configuration; one
// outgoing connection per tile and a single clock for the NoC side are this
// design's choices.
module mpsoc_top
  import mpsoc_pkg::*;
#(
  parameter int N_TILES = 2,
  parameter int IMEM_AW = 13,
  parameter int DMEM_AW = 13,
  parameter int SMEM_AW = 12,
  parameter int MMEM_AW = 13,
  parameter int BURST   = 32
) (
  input  logic        clk_sys,
  input  logic        rst_n,
  // processor cores
  output logic        tile_clk    [N_TILES],
  output logic        tile_ce     [N_TILES],
  input  cpu2tile_t   cpu_i       [N_TILES],
  output tile2cpu_t   cpu_o       [N_TILES],
  input  logic        iload_en    [N_TILES],
  input  logic [IMEM_AW-1:0] iload_addr [N_TILES],
  input  logic [31:0] iload_data  [N_TILES],
  // NoC side
  output dtl_m2s_t    tile_dtl_o  [N_TILES],
  input  dtl_s2m_t    tile_dtl_i  [N_TILES],
  input  dtl_m2s_t    mem_dtl_i,
  output dtl_s2m_t    mem_dtl_o,
  // monitor processor
  input  logic        mon_trace_rd    [N_TILES],
  output fsl_word_t   mon_trace_rdata [N_TILES],
  output logic        mon_trace_empty [N_TILES],
  input  logic        mon_sync_wr     [N_TILES],
  input  fsl_word_t   mon_sync_wdata  [N_TILES],
  output logic        mon_sync_full   [N_TILES],
  input  moncpu_in_t  mon_mem_i,
  output logic [31:0] mon_mem_rdata,
  output logic [31:0] mon_time,
  // observation
  output logic [31:0] sys_time     [N_TILES],
  output logic [4:0]  n_active     [N_TILES],
  output logic        gated        [N_TILES],
  output logic        switch_event [N_TILES],
  output logic        conn_busy    [N_TILES],
  output logic        trace_drop   [N_TILES],
  output logic        mem_busy
);
  tile2cpu_t  tile_o     [N_TILES];
  logic       trace_wr   [N_TILES];
  fsl_word_t  trace_wd   [N_TILES];
  logic       trace_full [N_TILES];
  logic       sync_rd    [N_TILES];
  fsl_word_t  sync_rd_q  [N_TILES];
  logic       sync_empty [N_TILES];

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    dtl_m2s_t d_o [1];
    dtl_s2m_t d_i [1];
    logic [0:0] busy;

    processing_tile #(.N_CONN(1), .IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW), .BURST(BURST)) u_tile (
      .clk_sys(clk_sys), .rst_n(rst_n), .tile_clk(tile_clk[t]), .tile_ce(tile_ce[t]),
      .cpu_i(cpu_i[t]), .cpu_o(tile_o[t]),
      .iload_en(iload_en[t]), .iload_addr(iload_addr[t]), .iload_data(iload_data[t]),
      .dtl_o(d_o), .dtl_i(d_i),
      .sys_time(sys_time[t]), .n_active(n_active[t]), .gated(gated[t]),
      .switch_event(switch_event[t]), .conn_busy(busy));

    assign tile_dtl_o[t] = d_o[0];
    assign d_i[0]        = tile_dtl_i[t];
    assign conn_busy[t]  = busy[0];

    assign trace_wr[t] = cpu_i[t].mon_wr;
    assign trace_wd[t] = cpu_i[t].mon_data;
    assign sync_rd[t]  = cpu_i[t].sync_rd;

    always_comb begin
      cpu_o[t]            = tile_o[t];
      cpu_o[t].mon_full   = trace_full[t];
      cpu_o[t].sync_data  = sync_rd_q[t];
      cpu_o[t].sync_empty = sync_empty[t];
    end
  end

  monitor_tile #(.N_TILES(N_TILES), .MEM_AW(MMEM_AW)) u_mon (
    .clk_sys(clk_sys), .rst_n(rst_n),
    .tile_clk(tile_clk), .trace_wr(trace_wr), .trace_wdata(trace_wd), .trace_full(trace_full),
    .trace_drop(trace_drop), .sync_rd(sync_rd), .sync_rdata(sync_rd_q), .sync_empty(sync_empty),
    .mon_trace_rd(mon_trace_rd), .mon_trace_rdata(mon_trace_rdata),
    .mon_trace_empty(mon_trace_empty), .mon_sync_wr(mon_sync_wr),
    .mon_sync_wdata(mon_sync_wdata), .mon_sync_full(mon_sync_full),
    .mon_mem_i(mon_mem_i), .mon_mem_rdata(mon_mem_rdata), .mon_time(mon_time));

  shared_mem_tile #(.AW(SMEM_AW)) u_smem (
    .clk(clk_sys), .rst_n(rst_n), .dtl_i(mem_dtl_i), .dtl_o(mem_dtl_o), .busy(mem_busy));
endmodule
