// Self-checking testbench of the monitor tile hardware with two tiles on
// different, unrelated clocks. Each tile writes monitoring packets (header
// 0xFFAA:type, then the payload words of that type) into its trace link;
// the monitor side drains both links and must find every word in order.
// With the monitor stopped, a tile must see its link full after 64 words and
// its further words dropped without stalling. The synchronization link from
// the monitor to a tile, the monitor memory and the monitor time are checked.
// Packet headers use the 0xFFAA marker and the packet types of the platform.
module tb_monitor_tile;
  import mpsoc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic tclk [2];
  initial begin tclk[0] = 0; tclk[1] = 0; end
  always #7 tclk[0] = ~tclk[0];
  always #11 tclk[1] = ~tclk[1];
  int checks = 0, failures = 0;

  logic trace_wr [2], trace_full [2], trace_drop [2], sync_rd [2], sync_empty [2];
  fsl_word_t trace_wdata [2], sync_rdata [2];
  logic mon_trace_rd [2], mon_trace_empty [2], mon_sync_wr [2], mon_sync_full [2];
  fsl_word_t mon_trace_rdata [2], mon_sync_wdata [2];
  moncpu_in_t mon_mem_i;
  logic [31:0] mon_mem_rdata, mon_time;

  monitor_tile #(.N_TILES(2), .MEM_AW(8)) dut (
    .clk_sys(clk), .rst_n(rst_n), .tile_clk(tclk), .*);

  fsl_word_t expq [2][$];
  bit drain = 0;
  int got [2];

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor side: poll both links
  always @(negedge clk) for (int t = 0; t < 2; t++) mon_trace_rd[t] <= drain && !mon_trace_empty[t];
  always @(posedge clk) for (int t = 0; t < 2; t++)
    if (mon_trace_rd[t] && !mon_trace_empty[t]) begin
      checks++;
      got[t]++;
      if (expq[t].size() == 0 || mon_trace_rdata[t] !== expq[t][0]) begin
        failures++; $display("FAIL tile %0d word %0d = %h", t, got[t], mon_trace_rdata[t]);
      end
      if (expq[t].size()) void'(expq[t].pop_front());
    end

  // one tile: write n packets, non-blocking
  task automatic tile_send(input int t, input int npk);
    int types [5] = '{6, 7, 2, 3, 5};
    int sizes [5] = '{1, 3, 3, 3, 2};
    for (int p = 0; p < npk; p++) begin
      int k = $urandom % 5;
      for (int w = 0; w <= sizes[k]; w++) begin
        fsl_word_t x;
        x = (w == 0) ? '{ctrl: 1'b0, data: {MON_MAGIC, 16'(types[k])}} : '{ctrl: 1'b0, data: $urandom};
        @(negedge tclk[t]); trace_wr[t] = 1; trace_wdata[t] = x;
        #1 if (!trace_full[t]) expq[t].push_back(x);
        @(posedge tclk[t]); #1 trace_wr[t] = 0;
      end
    end
  endtask

  initial begin
    int drops;
    for (int t = 0; t < 2; t++) begin
      trace_wr[t] = 0; trace_wdata[t] = '0; sync_rd[t] = 0; mon_sync_wr[t] = 0; mon_sync_wdata[t] = '0;
      mon_trace_rd[t] = 0; got[t] = 0;
    end
    mon_mem_i = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    drain = 1;
    fork tile_send(0, 60); tile_send(1, 60); join
    wait (expq[0].size() == 0 && expq[1].size() == 0);
    check("packets delivered", got[0] > 100 && got[1] > 100);
    // overflow with the monitor stopped
    drain = 0;
    repeat (5) @(posedge clk);
    drops = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge tclk[0]); trace_wr[0] = 1; trace_wdata[0] = '{ctrl: 1'b0, data: 32'(i)};
      #1 if (!trace_full[0]) expq[0].push_back(trace_wdata[0]);
      if (trace_drop[0]) drops++;
      @(posedge tclk[0]); #1 trace_wr[0] = 0;
    end
    check($sformatf("64 words then drops (%0d dropped)", drops), drops == 16 && expq[0].size() == 64);
    got[0] = 0;
    drain = 1;
    wait (expq[0].size() == 0);
    check("first 64 words kept", got[0] == 64);
    // sync link monitor -> tile 1
    @(negedge clk); mon_sync_wr[1] = 1; mon_sync_wdata[1] = '{ctrl: 1'b1, data: 32'h5747_4152};
    @(negedge clk); mon_sync_wr[1] = 0;
    wait (!sync_empty[1]);
    check("sync word", sync_rdata[1] == '{ctrl: 1'b1, data: 32'h5747_4152});
    @(negedge tclk[1]); sync_rd[1] = 1; @(posedge tclk[1]); #1 sync_rd[1] = 0;
    repeat (4) @(posedge tclk[1]);
    check("sync link empty", sync_empty[1]);
    // monitor memory
    @(negedge clk); mon_mem_i = '{mem_en: 1'b1, mem_we: 4'hF, mem_addr: 32'h40, mem_wdata: 32'hCAFE_F00D};
    @(negedge clk); mon_mem_i = '{mem_en: 1'b1, mem_we: 4'h0, mem_addr: 32'h40, mem_wdata: 32'h0};
    @(negedge clk); mon_mem_i = '0;
    check("monitor memory", mon_mem_rdata == 32'hCAFE_F00D);
    begin
      logic [31:0] t0;
      t0 = mon_time;
      repeat (10) @(posedge clk);
      #1 check("monitor time", mon_time - t0 == 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
