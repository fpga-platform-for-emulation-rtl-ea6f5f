// Self-checking testbench of the processing tile, with a testbench model of
// the processor core driving the tile's core-side ports on tile_clk and a
// DTL memory model as the remote end of the tile's connection.
// Checks: program load through the instruction memory's load port and fetch
// on the instruction bus; data memory write/read; DMA write from the data
// memory to the remote memory and DMA read back into the data memory
// (through the communication unit registers); a predictable switch to 8/16
// with gate and un-gate, after which the local timer advances by half the
// wall time; the system timer interrupt.
// Memory data are checked against the testbench's own copies.
module tb_processing_tile;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tile_clk, tile_ce;
  cpu2tile_t cpu_i;
  tile2cpu_t cpu_o;
  logic iload_en = 0;
  logic [9:0] iload_addr = 0;
  logic [31:0] iload_data = 0;
  dtl_m2s_t dtl_o [1];
  dtl_s2m_t dtl_i [1];
  logic [31:0] sys_time;
  logic [4:0] n_active;
  logic gated, switch_event;
  logic [0:0] conn_busy;

  processing_tile #(.N_CONN(1), .IMEM_AW(10), .DMEM_AW(10)) dut (.clk_sys(clk), .*);
  dtl_mem_model #(.AW(10), .STALL_PCT(25)) remote (.clk(clk), .rst_n(rst_n), .req(dtl_o[0]), .rsp(dtl_i[0]));

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- core model ----
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

  initial begin
    logic [31:0] d, lt0, lt1, st0, st1, t2;
    cpu_i = '0;
    for (int i = 0; i < 1024; i++) remote.mem[i] = 32'hBEEF_0000 + 32'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // program load on clk_sys
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); iload_en = 1; iload_addr = 10'(i); iload_data = 32'h1234_0000 + 32'(i * 7);
    end
    @(negedge clk); iload_en = 0;
    for (int i = 0; i < 16; i++) begin
      ifetch(32'(i * 4), d);
      check($sformatf("fetch %0d", i), d == 32'h1234_0000 + 32'(i * 7));
    end
    // data memory
    for (int i = 0; i < 50; i++) dwr(32'(i * 4), 32'h7700_0000 + 32'(i));
    drd(32'(17 * 4), d); check("dmem read", d == 32'h7700_0011);
    // DMA write D-Mem words 0..49 -> remote word 100
    bwr(CDMAC_REG_SRC, 0); bwr(CDMAC_REG_DST, 32'(100 * 4)); bwr(CDMAC_REG_LEN, 50);
    bwr(CDMAC_REG_CMD, 32'(OP_DMA_WRITE));
    conn_wait();
    for (int i = 0; i < 50; i++) check($sformatf("remote word %0d", i), remote.mem[100 + i] == 32'h7700_0000 + 32'(i));
    // DMA read remote 500..519 -> D-Mem word 600
    bwr(CDMAC_REG_SRC, 32'(500 * 4)); bwr(CDMAC_REG_DST, 32'(600 * 4)); bwr(CDMAC_REG_LEN, 20);
    bwr(CDMAC_REG_CMD, 32'(OP_DMA_READ));
    conn_wait();
    for (int i = 0; i < 20; i++) begin
      drd(32'((600 + i) * 4), d);
      check($sformatf("dmem after DMA read %0d", i), d == 32'hBEEF_0000 + 32'(500 + i));
    end
    // frequency switch to 8/16 with gate/un-gate
    tmr(0, 32'd1_000_000);
    tmr(1, 32'b001);
    repeat (10) cyc();
    t2 = (cpu_o.timer_value - 32'd300) & ~32'hF;
    freq(0, t2 | 32'd8);
    ungate(t2 - 32'd32);
    freq(1, 0);
    wait (gated);
    cyc();                                   // next edge comes after un-gate
    check("clock came back after T1", sys_time <= t2 - 32'd32);
    check("running at 8/16", n_active == 5'd8);
    lt0 = cpu_o.local_time; st0 = sys_time;
    repeat (400) cyc();
    lt1 = cpu_o.local_time; st1 = sys_time;
    check($sformatf("local timer at half wall time (%0d vs %0d)", lt1 - lt0, st0 - st1),
          (lt1 - lt0) == 400 && (st0 - st1) >= 798 && (st0 - st1) <= 802);
    // interrupt
    tmr(0, 32'd40);
    tmr(1, 32'b011);
    check("no irq yet", !cpu_o.irq);
    repeat (40) cyc();
    check("irq", cpu_o.irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
