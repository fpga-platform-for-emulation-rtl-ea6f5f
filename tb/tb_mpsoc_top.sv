// End-to-end testbench of the dual-tile platform at its default sizes.
//
// Two processor-core models run a producer/consumer stream through the
// shared memory, with a TDM network model between the tiles' connections and
// the shared memory tile, and a monitor-processor model on the monitor side:
//   1. the monitor loads a program word into each instruction memory and
//      releases both tiles through the synchronization links;
//   2. tile 0 (producer) switches to 8/16 of the clock with the gate/un-gate
//      method, fills a token of 96 words in its data memory, moves it to the
//      shared memory with a DMA write (three bursts) and sets a flag word with
//      a processor-controlled write; it reports each step to the monitor;
//   3. tile 1 (consumer) meanwhile streams its own 64 words to the shared
//      memory (so both connections compete for TDM slots), polls the flag
//      with processor-controlled reads, fetches the token with a DMA read
//      into its data memory and checks it word by word; it waits for a
//      system timer interrupt, then floods its trace link to show the
//      non-blocking drop;
//   4. the monitor drains the trace links and checks the packet headers.
// Every mechanism is counted; one that never happened counts as a failure.
// It runs every parameter at its default value.
module tb_mpsoc_top;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #10 clk = ~clk;     // 50 MHz, the maximum frequency of the platform
  int checks = 0, failures = 0;

  logic        tile_clk [2], tile_ce [2];
  cpu2tile_t   cpu_i [2];
  tile2cpu_t   cpu_o [2];
  logic        iload_en [2];
  logic [12:0] iload_addr [2];
  logic [31:0] iload_data [2];
  dtl_m2s_t    tile_dtl_o [2], mem_dtl_i;
  dtl_s2m_t    tile_dtl_i [2], mem_dtl_o;
  logic        mon_trace_rd [2], mon_trace_empty [2], mon_sync_wr [2], mon_sync_full [2];
  fsl_word_t   mon_trace_rdata [2], mon_sync_wdata [2];
  moncpu_in_t  mon_mem_i;
  logic [31:0] mon_mem_rdata, mon_time;
  logic [31:0] sys_time [2];
  logic [4:0]  n_active [2];
  logic        gated [2], switch_event [2], conn_busy [2], trace_drop [2], mem_busy;

  mpsoc_top dut (.clk_sys(clk), .*);

  noc_model #(.N(2)) noc (.clk(clk), .rst_n(rst_n), .ini_o(tile_dtl_o), .ini_i(tile_dtl_i),
                          .tgt_i(mem_dtl_i), .tgt_o(mem_dtl_o));

  cpu_bfm cpu0 (.tile_clk(tile_clk[0]), .cpu_i(cpu_i[0]), .cpu_o(cpu_o[0]));
  cpu_bfm cpu1 (.tile_clk(tile_clk[1]), .cpu_i(cpu_i[1]), .cpu_o(cpu_o[1]));

  // ---- mechanism counters ----
  int n_switch = 0, n_gated_cycles = 0, n_dma_bursts = 0, n_slot_wait = 0, n_drop = 0;
  int n_pct_rd = 0, n_pct_wr = 0, n_dma_rd = 0, n_dma_wr = 0, n_irq = 0, n_sync = 0, n_packets = 0;
  always @(posedge clk) begin
    for (int t = 0; t < 2; t++) begin
      if (switch_event[t]) n_switch++;
      if (gated[t]) n_gated_cycles++;
      if (trace_drop[t]) n_drop++;
    end
    if (mem_dtl_i.cmd_valid && mem_dtl_o.cmd_accept) n_dma_bursts++;
  end

  initial begin
    #20ms; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [31:0] TOKEN = 32'h0000_0400;   // shared memory byte address
  localparam logic [31:0] OTHER = 32'h0000_1000;
  localparam logic [31:0] FLAG  = 32'h0000_3FFC;
  localparam int NTOK = 96;

  // ---- monitor processor model ----
  fsl_word_t trace_log [2][$];
  bit drain = 0;
  always @(negedge clk) for (int t = 0; t < 2; t++) mon_trace_rd[t] <= drain && !mon_trace_empty[t];
  always @(posedge clk) for (int t = 0; t < 2; t++)
    if (mon_trace_rd[t] && !mon_trace_empty[t]) trace_log[t].push_back(mon_trace_rdata[t]);

  task automatic producer();
    fsl_word_t w;
    logic [31:0] d;
    cpu0.wait_sync(w);
    n_sync++;
    cpu0.tmr(0, 32'd2_000_000); cpu0.tmr(1, 32'b001);
    repeat (8) cpu0.cyc();
    cpu0.switch_freq(8, 400, 64);
    check("producer at 8/16", n_active[0] == 5'd8);
    cpu0.trace({MON_MAGIC, 16'h0006}); cpu0.trace(32'd1);           // execution packet
    for (int i = 0; i < NTOK; i++) cpu0.dwr(32'(i * 4), 32'hD00D_0000 + 32'(i * 5));
    cpu0.dma(OP_DMA_WRITE, 32'h0, TOKEN, NTOK);
    n_dma_wr++;
    cpu0.conn_wait();
    cpu0.pct_write1(FLAG, 32'h1);
    n_pct_wr++;
    cpu0.trace({MON_MAGIC, 16'h0003}); cpu0.trace(32'd0); cpu0.trace(TOKEN); cpu0.trace(32'(NTOK));  // FIFO write
    cpu0.conn_wait();
  endtask

  task automatic consumer();
    fsl_word_t w;
    logic [31:0] d;
    int polls = 0;
    cpu1.wait_sync(w);
    n_sync++;
    for (int i = 0; i < 64; i++) cpu1.dwr(32'h2000 + 32'(i * 4), 32'h0BAD_0000 + 32'(i));
    cpu1.dma(OP_DMA_WRITE, 32'h2000, OTHER, 64);
    n_dma_wr++;
    do begin
      cpu1.pct_read1(FLAG, d);
      n_pct_rd++;
      polls++;
    end while (d != 32'h1 && polls < 2000);
    check("flag seen", d == 32'h1);
    cpu1.dma(OP_DMA_READ, TOKEN, 32'h4000, NTOK);
    n_dma_rd++;
    cpu1.conn_wait();
    for (int i = 0; i < NTOK; i++) begin
      cpu1.drd(32'h4000 + 32'(i * 4), d);
      check($sformatf("token word %0d", i), d == 32'hD00D_0000 + 32'(i * 5));
    end
    cpu1.trace({MON_MAGIC, 16'h0002}); cpu1.trace(32'd0); cpu1.trace(TOKEN); cpu1.trace(32'(NTOK));  // FIFO read
    // system timer interrupt ends the task time slice
    cpu1.tmr(0, 32'd300); cpu1.tmr(1, 32'b011);
    while (!cpu_o[1].irq) cpu1.cyc();
    n_irq++;
    cpu1.tmr(1, 32'b101);
    // flood the trace link while the monitor is not reading
    for (int i = 0; i < 80; i++) cpu1.trace(32'hF100_0000 + 32'(i));
  endtask

  initial begin
    logic [31:0] d;
    for (int t = 0; t < 2; t++) begin
      iload_en[t] = 0; iload_addr[t] = 0; iload_data[t] = 0;
      mon_sync_wr[t] = 0; mon_sync_wdata[t] = '0; mon_trace_rd[t] = 0;
    end
    mon_mem_i = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // program load
    for (int t = 0; t < 2; t++) begin
      @(negedge clk); iload_en[t] = 1; iload_addr[t] = 13'd5; iload_data[t] = 32'hB800_0000 + 32'(t);
      @(negedge clk); iload_en[t] = 0;
    end
    cpu0.ifetch(32'd20, d); check("tile 0 fetch", d == 32'hB800_0000);
    cpu1.ifetch(32'd20, d); check("tile 1 fetch", d == 32'hB800_0001);
    // release the tiles
    for (int t = 0; t < 2; t++) begin
      @(negedge clk); mon_sync_wr[t] = 1; mon_sync_wdata[t] = '{ctrl: 1'b1, data: 32'h0000_0001};
    end
    @(negedge clk); mon_sync_wr[0] = 0; mon_sync_wr[1] = 0;
    fork producer(); consumer(); join
    // shared memory holds both streams
    for (int i = 0; i < 64; i++)
      check($sformatf("shared word %0d", i), dut.u_smem.mem[OTHER[13:2] + 12'(i)] == 32'h0BAD_0000 + 32'(i));
    n_drop = cpu1.n_dropped;
    drain = 1;
    repeat (400) @(posedge clk);
    // monitor: parse packets of tile 0 and the start of tile 1
    for (int t = 0; t < 2; t++) begin
      int i, len;
      i = 0;
      while (i < trace_log[t].size() && trace_log[t][i].data[31:16] == MON_MAGIC) begin
        len = (trace_log[t][i].data[15:0] == 16'h0006) ? 1 : 3;
        n_packets++;
        i += 1 + len;
      end
    end
    check("tile 0 packets", trace_log[0].size() == 6);
    check("tile 1 trace kept 64 words", trace_log[1].size() == 64);
    n_slot_wait = noc.wait_cycles;
    $display("mechanisms: switch=%0d gated_cycles=%0d dma_wr=%0d dma_rd=%0d bursts=%0d pct_wr=%0d pct_rd=%0d slot_wait=%0d irq=%0d sync=%0d drop=%0d packets=%0d",
             n_switch, n_gated_cycles, n_dma_wr, n_dma_rd, n_dma_bursts, n_pct_wr, n_pct_rd, n_slot_wait, n_irq, n_sync, n_drop, n_packets);
    check("frequency switch happened", n_switch > 0);
    check("clock gating happened", n_gated_cycles > 0);
    check("DMA write happened", n_dma_wr > 0);
    check("DMA read happened", n_dma_rd > 0);
    check("DMA cut into bursts", n_dma_bursts >= 3 + 2 + 3 + 1 + 1);
    check("PCT write happened", n_pct_wr > 0);
    check("PCT read happened", n_pct_rd > 0);
    check("TDM slot wait happened", n_slot_wait > 0);
    check("timer interrupt happened", n_irq > 0);
    check("tiles released by monitor", n_sync == 2);
    check("trace words dropped", n_drop == 4 + 80 - 64);
    check("monitor packets parsed", n_packets == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
