// Processing tile, without its processor core.
//
// The tile gives a processor core everything the platform needs around it:
// the power management unit (system timer and frequency generator, which
// produce the scaled and gated tile clock), a local timer counting tile clock
// cycles, the instruction memory and the data memory on the local memory
// buses, and the communication unit with one connection DMA controller per
// outgoing NoC connection. The core itself is external: its local memory
// bus, peripheral bus and FSL signals are the cpu_i/cpu_o ports, and it must
// be clocked by tile_clk. The trace and synchronization FSL links to the
// monitor tile are wired at the platform level, not here.
// Two clock domains, as in the platform description: clk_sys (maximum
// frequency, also the NoC clock) for the PMU and the communication unit, and
// tile_clk for the core side. The data memory is true dual port, port A on
// the core's data bus (tile_clk), port B on connection 0 of the
// communication unit (clk_sys), which is the single outgoing connection
// arrangement of the dual-tile configuration. Connections 1.. get a
// communication memory (C-Mem) of their own on the communication unit side;
// the core reaches C-Mem i at data-bus byte addresses 0x1000_0000 * i.
// The instruction memory's second port (clk_sys) loads the program.
// Memory sizes default to 32 KB each.
module processing_tile
  import mpsoc_pkg::*;
#(
  parameter int N_CONN  = 1,
  parameter int IMEM_AW = 13,
  parameter int DMEM_AW = 13,
  parameter int CMEM_AW = 13,
  parameter int BURST   = 32
) (
  input  logic           clk_sys,
  input  logic           rst_n,
  output logic           tile_clk,
  output logic           tile_ce,
  input  cpu2tile_t      cpu_i,
  output tile2cpu_t      cpu_o,
  // program load port of the instruction memory (clk_sys)
  input  logic           iload_en,
  input  logic [IMEM_AW-1:0] iload_addr,
  input  logic [31:0]    iload_data,
  // NoC initiator ports, one per outgoing connection (clk_sys)
  output dtl_m2s_t       dtl_o [N_CONN],
  input  dtl_s2m_t       dtl_i [N_CONN],
  // observation
  output logic [31:0]    sys_time,
  output logic [4:0]     n_active,
  output logic           gated,
  output logic           switch_event,
  output logic [N_CONN-1:0] conn_busy
);
  localparam int MAW = (DMEM_AW > CMEM_AW) ? DMEM_AW : CMEM_AW;

  pmu u_pmu (
    .clk_sys(clk_sys), .rst_n(rst_n), .tile_clk(tile_clk), .tile_ce(tile_ce),
    .tmr_wr(cpu_i.tmr_wr), .tmr_data(cpu_i.tmr_data), .tmr_full(cpu_o.tmr_full),
    .freq_wr(cpu_i.freq_wr), .freq_data(cpu_i.freq_data), .freq_full(cpu_o.freq_full),
    .ungate_wr(cpu_i.ungate_wr), .ungate_data(cpu_i.ungate_data), .ungate_full(cpu_o.ungate_full),
    .timer_value(cpu_o.timer_value), .irq(cpu_o.irq),
    .sys_time(sys_time), .n_active(n_active), .gated(gated), .switch_event(switch_event));

  local_timer u_ltimer (.clk(tile_clk), .rst_n(rst_n), .clr(cpu_i.ltimer_clr), .count(cpu_o.local_time));

  // instruction memory: port A fetch (tile_clk), port B program load (clk_sys)
  logic [31:0] iload_q;
  tdp_ram #(.AW(IMEM_AW)) u_imem (
    .clka(tile_clk), .ena(cpu_i.ilmb_en), .wea(4'b0000), .addra(cpu_i.ilmb_addr[IMEM_AW+1:2]),
    .dina(32'd0), .douta(cpu_o.ilmb_rdata),
    .clkb(clk_sys), .enb(iload_en), .web({4{iload_en}}), .addrb(iload_addr),
    .dinb(iload_data), .doutb(iload_q));

  // communication unit
  logic              cu_en    [N_CONN];
  logic [3:0]        cu_we    [N_CONN];
  logic [MAW-1:0]    cu_addr  [N_CONN];
  logic [31:0]       cu_wdata [N_CONN];
  logic [31:0]       cu_rdata [N_CONN];

  comm_unit #(.N_CONN(N_CONN), .BURST(BURST), .MEM_AW(MAW)) u_comm (
    .clk_tile(tile_clk), .clk_noc(clk_sys), .rst_n(rst_n),
    .bus_req(cpu_i.bus_req), .bus_we(cpu_i.bus_we), .bus_addr(cpu_i.bus_addr),
    .bus_wdata(cpu_i.bus_wdata), .bus_rdata(cpu_o.bus_rdata),
    .dtl_o(dtl_o), .dtl_i(dtl_i),
    .mem_en(cu_en), .mem_we(cu_we), .mem_addr(cu_addr), .mem_wdata(cu_wdata),
    .mem_rdata(cu_rdata), .busy(conn_busy));

  // data memory (region 0) and communication memories (regions 1..N_CONN-1)
  logic [3:0]  region, region_q;
  logic [31:0] dout [N_CONN];
  assign region = cpu_i.dlmb_addr[31:28];

  always_ff @(posedge tile_clk or negedge rst_n) begin
    if (!rst_n)             region_q <= '0;
    else if (cpu_i.dlmb_en) region_q <= region;
  end

  for (genvar c = 0; c < N_CONN; c++) begin : g_mem
    localparam int AW = (c == 0) ? DMEM_AW : CMEM_AW;
    logic sel;
    assign sel = cpu_i.dlmb_en && region == 4'(c);
    tdp_ram #(.AW(AW)) u_mem (
      .clka(tile_clk), .ena(sel), .wea(sel ? cpu_i.dlmb_we : 4'b0000),
      .addra(cpu_i.dlmb_addr[AW+1:2]), .dina(cpu_i.dlmb_wdata), .douta(dout[c]),
      .clkb(clk_sys), .enb(cu_en[c]), .web(cu_we[c]), .addrb(cu_addr[c][AW-1:0]),
      .dinb(cu_wdata[c]), .doutb(cu_rdata[c]));
  end

  always_comb begin
    cpu_o.dlmb_rdata = '0;
    for (int c = 0; c < N_CONN; c++)
      if (region_q == 4'(c)) cpu_o.dlmb_rdata = dout[c];
  end

  // monitor links are wired at the platform level
  assign cpu_o.mon_full   = 1'b0;
  assign cpu_o.sync_data  = '0;
  assign cpu_o.sync_empty = 1'b1;
endmodule
