// Bus-functional model of a processing tile's processor core for testbenches.
//
// Drives the core-side ports of a tile on its tile clock and offers the
// operations a program on the core performs: local memory access,
// connection DMA controller register access (one task per transaction type,
// following the blocking usage: wait until the connection is free, program
// it, send the command), PMU commands over the FSL ports, trace words to the
// monitor (non-blocking) and reading the monitor's synchronization link.
module cpu_bfm
  import mpsoc_pkg::*;
(
  input  logic      tile_clk,
  output cpu2tile_t cpu_i,
  input  tile2cpu_t cpu_o
);
  int n_dropped = 0;
  initial cpu_i = '0;

  task automatic cyc(); @(posedge tile_clk); #1; endtask
  task automatic dwr(input logic [31:0] a, input logic [31:0] d);
    @(negedge tile_clk); cpu_i.dlmb_en = 1; cpu_i.dlmb_we = 4'hF; cpu_i.dlmb_addr = a; cpu_i.dlmb_wdata = d;
    cyc(); cpu_i.dlmb_en = 0; cpu_i.dlmb_we = 0;
  endtask
  task automatic drd(input logic [31:0] a, output logic [31:0] d);
    @(negedge tile_clk); cpu_i.dlmb_en = 1; cpu_i.dlmb_addr = a;
    cyc(); cpu_i.dlmb_en = 0; d = cpu_o.dlmb_rdata;
  endtask
  task automatic ifetch(input logic [31:0] a, output logic [31:0] d);
    @(negedge tile_clk); cpu_i.ilmb_en = 1; cpu_i.ilmb_addr = a;
    cyc(); cpu_i.ilmb_en = 0; d = cpu_o.ilmb_rdata;
  endtask
  task automatic bwr(input logic [2:0] r, input logic [31:0] d);
    @(negedge tile_clk); cpu_i.bus_req = 1; cpu_i.bus_we = 1; cpu_i.bus_addr = {3'd0, r}; cpu_i.bus_wdata = d;
    cyc(); cpu_i.bus_req = 0; cpu_i.bus_we = 0;
  endtask
  task automatic brd(input logic [2:0] r, output logic [31:0] d);
    @(negedge tile_clk); cpu_i.bus_req = 1; cpu_i.bus_we = 0; cpu_i.bus_addr = {3'd0, r};
    cyc(); cpu_i.bus_req = 0; d = cpu_o.bus_rdata;
  endtask
  task automatic conn_wait();
    logic [31:0] s;
    do brd(CDMAC_REG_STATUS, s); while (s[0]);
  endtask
  task automatic dma(input cdmac_op_e op, input logic [31:0] src, input logic [31:0] dst, input int len);
    conn_wait();
    bwr(CDMAC_REG_SRC, src); bwr(CDMAC_REG_DST, dst); bwr(CDMAC_REG_LEN, 32'(len));
    bwr(CDMAC_REG_CMD, 32'(op));
  endtask
  task automatic pct_write1(input logic [31:0] dst, input logic [31:0] d);
    conn_wait();
    bwr(CDMAC_REG_DST, dst); bwr(CDMAC_REG_LEN, 1);
    bwr(CDMAC_REG_CMD, 32'(OP_PCT_WRITE));
    bwr(CDMAC_REG_DATA, d);
  endtask
  task automatic pct_read1(input logic [31:0] src, output logic [31:0] d);
    conn_wait();
    bwr(CDMAC_REG_SRC, src); bwr(CDMAC_REG_LEN, 1);
    bwr(CDMAC_REG_CMD, 32'(OP_PCT_READ));
    conn_wait();
    brd(CDMAC_REG_DATA, d);
  endtask
  task automatic tmr(input logic ctrl, input logic [31:0] d);
    @(negedge tile_clk); cpu_i.tmr_wr = 1; cpu_i.tmr_data = '{ctrl: ctrl, data: d};
    cyc(); cpu_i.tmr_wr = 0;
  endtask
  task automatic freq(input logic ctrl, input logic [31:0] d);
    @(negedge tile_clk); cpu_i.freq_wr = 1; cpu_i.freq_data = '{ctrl: ctrl, data: d};
    cyc(); cpu_i.freq_wr = 0;
  endtask
  task automatic ungate(input logic [31:0] d);
    @(negedge tile_clk); cpu_i.ungate_wr = 1; cpu_i.ungate_data = '{ctrl: 1'b0, data: d};
    cyc(); cpu_i.ungate_wr = 0;
  endtask
  // predictable switch: new N at T2, clock back at T1 = T2 - gap
  task automatic switch_freq(input int n, input int lead, input int gap);
    logic [31:0] t2;
    t2 = (cpu_o.timer_value - 32'(lead)) & ~32'hF;
    freq(0, t2 | 32'(n % 16));
    ungate(t2 - 32'(gap));
    freq(1, 0);
    // the core stops a few cycles after the gate command; it resumes after T1
    do cyc(); while (cpu_o.timer_value > t2 - 32'(gap));
  endtask
  task automatic trace(input logic [31:0] d);
    @(negedge tile_clk); cpu_i.mon_wr = 1; cpu_i.mon_data = '{ctrl: 1'b0, data: d};
    #1 if (cpu_o.mon_full) n_dropped++;
    cyc(); cpu_i.mon_wr = 0;
  endtask
  task automatic wait_sync(output fsl_word_t w);
    while (cpu_o.sync_empty) cyc();
    w = cpu_o.sync_data;
    @(negedge tile_clk); cpu_i.sync_rd = 1;
    cyc(); cpu_i.sync_rd = 0;
  endtask
endmodule
