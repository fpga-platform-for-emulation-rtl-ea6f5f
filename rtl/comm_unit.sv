// Communication unit of a processing tile.
//
// Holds one connection DMA controller per outgoing NoC connection, so that
// each connection that has to be composable has a controller of its own and
// no scheduler is needed inside a controller. The processor reaches the
// controllers through one register port: word address bits [5:3] select the
// controller and bits [2:0] its register; read data return on the next
// clk_tile edge. Each controller has its own DTL initiator port and its own
// local memory port (the tile wires connection 0 to the data memory).
// The one-controller-per-connection structure follows the platform
// description; the address split is this implementation's choice.
module comm_unit
  import mpsoc_pkg::*;
#(
  parameter int N_CONN = 1,
  parameter int BURST  = 32,
  parameter int MEM_AW = 13
) (
  input  logic              clk_tile,
  input  logic              clk_noc,
  input  logic              rst_n,
  input  logic              bus_req,
  input  logic              bus_we,
  input  logic [5:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output dtl_m2s_t          dtl_o [N_CONN],
  input  dtl_s2m_t          dtl_i [N_CONN],
  output logic              mem_en    [N_CONN],
  output logic [3:0]        mem_we    [N_CONN],
  output logic [MEM_AW-1:0] mem_addr  [N_CONN],
  output logic [31:0]       mem_wdata [N_CONN],
  input  logic [31:0]       mem_rdata [N_CONN],
  output logic [N_CONN-1:0] busy
);
  logic [31:0] rdata [N_CONN];
  logic [2:0]  sel_q;

  always_ff @(posedge clk_tile or negedge rst_n) begin
    if (!rst_n)       sel_q <= '0;
    else if (bus_req) sel_q <= bus_addr[5:3];
  end

  for (genvar c = 0; c < N_CONN; c++) begin : g_conn
    cdmac #(.BURST(BURST), .BUF_DEPTH(BURST), .MEM_AW(MEM_AW)) u_cdmac (
      .clk_tile(clk_tile), .clk_noc(clk_noc), .rst_n(rst_n),
      .reg_req(bus_req && bus_addr[5:3] == 3'(c)), .reg_we(bus_we),
      .reg_addr(bus_addr[2:0]), .reg_wdata(bus_wdata), .reg_rdata(rdata[c]),
      .dtl_o(dtl_o[c]), .dtl_i(dtl_i[c]),
      .mem_en(mem_en[c]), .mem_we(mem_we[c]), .mem_addr(mem_addr[c]),
      .mem_wdata(mem_wdata[c]), .mem_rdata(mem_rdata[c]),
      .busy_noc(busy[c]));
  end

  always_comb begin
    bus_rdata = '0;
    for (int c = 0; c < N_CONN; c++)
      if (sel_q == 3'(c)) bus_rdata = rdata[c];
  end

  initial assert (N_CONN >= 1 && N_CONN <= 8) else $error("comm_unit: N_CONN must be 1..8");
endmodule
