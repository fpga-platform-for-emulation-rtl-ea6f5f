// Self-checking testbench of the connection DMA controller.
// The controller runs on a 100 MHz NoC clock, the register side on a slower,
// unrelated processor clock; the remote memory is a DTL model with random
// stalls and the local memory a model with one cycle of read latency.
// Checks, each against data the testbench wrote itself:
//   * PCT write of 8 words lands at the remote address;
//   * PCT read of 8 words returns the remote words through DATA;
//   * DMA write of 100 words local -> remote, cut into bursts of at most 32
//     (4 commands), with busy high until the last word;
//   * DMA read of 70 words remote -> local (3 bursts);
//   * wr_last protocol and the cycle count of a DMA write (two NoC cycles
//     per word plus per-burst overhead, bounded).
// Expected memory contents come from the testbench's own copy of the data.
module tb_cdmac;
  import mpsoc_pkg::*;
  logic clk = 0, cpu_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  always #13 cpu_clk = ~cpu_clk;
  int checks = 0, failures = 0;

  logic reg_req = 0, reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  dtl_m2s_t dtl_o;
  dtl_s2m_t dtl_i;
  logic mem_en;
  logic [3:0] mem_we;
  logic [9:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic busy_noc;

  cdmac #(.BURST(32), .BUF_DEPTH(32), .MEM_AW(10)) dut (
    .clk_tile(cpu_clk), .clk_noc(clk), .rst_n(rst_n), .*);

  dtl_mem_model #(.AW(12), .STALL_PCT(30)) remote (.clk(clk), .rst_n(rst_n), .req(dtl_o), .rsp(dtl_i));

  logic [31:0] lmem [1024];
  always @(posedge clk) if (mem_en) begin
    mem_rdata <= lmem[mem_addr];
    if (mem_we == 4'hF) lmem[mem_addr] <= mem_wdata;
  end

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [2:0] a, input logic [31:0] d);
    @(negedge cpu_clk); reg_req = 1; reg_we = 1; reg_addr = a; reg_wdata = d;
    @(posedge cpu_clk); #1 reg_req = 0; reg_we = 0;
  endtask
  task automatic rd(input logic [2:0] a, output logic [31:0] d);
    @(negedge cpu_clk); reg_req = 1; reg_we = 0; reg_addr = a;
    @(posedge cpu_clk); #1 reg_req = 0; d = reg_rdata;
  endtask
  task automatic wait_idle();
    logic [31:0] s;
    do rd(CDMAC_REG_STATUS, s); while (s[0]);
  endtask

  initial begin
    logic [31:0] d, s;
    int nrd0, nwr0, t0, t1;
    for (int i = 0; i < 4096; i++) remote.mem[i] = 32'hA000_0000 + 32'(i);
    for (int i = 0; i < 1024; i++) lmem[i] = 32'h5000_0000 + 32'(i * 3);
    repeat (4) @(posedge cpu_clk);
    rst_n = 1;
    repeat (4) @(posedge cpu_clk);

    // PCT write: 8 words to remote byte address 0x100 (word 64)
    wait_idle();
    wr(CDMAC_REG_DST, 32'h100);
    wr(CDMAC_REG_LEN, 8);
    wr(CDMAC_REG_CMD, 32'(OP_PCT_WRITE));
    for (int i = 0; i < 8; i++) wr(CDMAC_REG_DATA, 32'hC0DE_0000 + 32'(i));
    wait_idle();
    repeat (4) @(posedge clk);
    for (int i = 0; i < 8; i++) check($sformatf("PCT write word %0d", i), remote.mem[64 + i] == 32'hC0DE_0000 + 32'(i));

    // PCT read: 8 words from remote word 200
    wr(CDMAC_REG_SRC, 32'(200 * 4));
    wr(CDMAC_REG_LEN, 8);
    wr(CDMAC_REG_CMD, 32'(OP_PCT_READ));
    wait_idle();
    rd(CDMAC_REG_STATUS, s);
    check("read buffer holds data", s[1]);
    for (int i = 0; i < 8; i++) begin
      rd(CDMAC_REG_DATA, d);
      check($sformatf("PCT read word %0d", i), d == 32'hA000_0000 + 32'(200 + i));
    end
    rd(CDMAC_REG_STATUS, s);
    check("read buffer empty", !s[1]);

    // DMA write: 100 words local word 10 -> remote word 1000
    nwr0 = remote.n_wr_cmd;
    wr(CDMAC_REG_SRC, 32'(10 * 4));
    wr(CDMAC_REG_DST, 32'(1000 * 4));
    wr(CDMAC_REG_LEN, 100);
    wr(CDMAC_REG_CMD, 32'(OP_DMA_WRITE));
    rd(CDMAC_REG_STATUS, s);
    check("busy after DMA command", s[0]);
    wait (busy_noc); t0 = $time;
    wait (!busy_noc); t1 = $time;
    wait_idle();
    for (int i = 0; i < 100; i++)
      check($sformatf("DMA write word %0d", i), remote.mem[1000 + i] == 32'h5000_0000 + 32'((10 + i) * 3));
    check("DMA write cut into 4 bursts", remote.n_wr_cmd - nwr0 == 4);
    check("burst limit 32", remote.max_burst == 32);
    // 2 cycles per word without stalls; with 30% stalls allow 4x
    check($sformatf("DMA write duration %0d cycles", (t1 - t0) / 10), (t1 - t0) / 10 >= 200 && (t1 - t0) / 10 < 800);

    // DMA read: 70 words remote word 3000 -> local word 500
    nrd0 = remote.n_rd_cmd;
    wr(CDMAC_REG_SRC, 32'(3000 * 4));
    wr(CDMAC_REG_DST, 32'(500 * 4));
    wr(CDMAC_REG_LEN, 70);
    wr(CDMAC_REG_CMD, 32'(OP_DMA_READ));
    wait_idle();
    for (int i = 0; i < 70; i++)
      check($sformatf("DMA read word %0d", i), lmem[500 + i] == 32'hA000_0000 + 32'(3000 + i));
    check("DMA read cut into 3 bursts", remote.n_rd_cmd - nrd0 == 3);
    check("neighbour word untouched", lmem[570] == 32'h5000_0000 + 32'(570 * 3));
    check("wr_last protocol", remote.proto_err == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
