// Self-checking testbench of the communication unit with two connections.
// Each connection has its own remote DTL memory model and local memory.
// Both controllers are started on DMA writes that overlap in time; each
// must deliver its own data to its own remote memory, the register decode
// must reach the right controller (addresses read back per connection), and
// a PCT read on connection 1 must return connection 1's remote data.
// It runs two connections with 16-word bursts to keep the run short.
module tb_comm_unit;
  import mpsoc_pkg::*;
  logic clk = 0, cpu_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  always #9 cpu_clk = ~cpu_clk;
  int checks = 0, failures = 0;

  logic bus_req = 0, bus_we = 0;
  logic [5:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  dtl_m2s_t dtl_o [2];
  dtl_s2m_t dtl_i [2];
  logic mem_en [2];
  logic [3:0] mem_we [2];
  logic [9:0] mem_addr [2];
  logic [31:0] mem_wdata [2], mem_rdata [2];
  logic [1:0] busy;

  comm_unit #(.N_CONN(2), .BURST(16), .MEM_AW(10)) dut (
    .clk_tile(cpu_clk), .clk_noc(clk), .rst_n(rst_n), .*);

  dtl_mem_model #(.AW(10), .STALL_PCT(20)) r0 (.clk(clk), .rst_n(rst_n), .req(dtl_o[0]), .rsp(dtl_i[0]));
  dtl_mem_model #(.AW(10), .STALL_PCT(40)) r1 (.clk(clk), .rst_n(rst_n), .req(dtl_o[1]), .rsp(dtl_i[1]));

  logic [31:0] lmem0 [1024], lmem1 [1024];
  always @(posedge clk) begin
    if (mem_en[0]) begin mem_rdata[0] <= lmem0[mem_addr[0]]; if (mem_we[0] == 4'hF) lmem0[mem_addr[0]] <= mem_wdata[0]; end
    if (mem_en[1]) begin mem_rdata[1] <= lmem1[mem_addr[1]]; if (mem_we[1] == 4'hF) lmem1[mem_addr[1]] <= mem_wdata[1]; end
  end

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input int c, input logic [2:0] a, input logic [31:0] d);
    @(negedge cpu_clk); bus_req = 1; bus_we = 1; bus_addr = {3'(c), a}; bus_wdata = d;
    @(posedge cpu_clk); #1 bus_req = 0; bus_we = 0;
  endtask
  task automatic rd(input int c, input logic [2:0] a, output logic [31:0] d);
    @(negedge cpu_clk); bus_req = 1; bus_we = 0; bus_addr = {3'(c), a};
    @(posedge cpu_clk); #1 bus_req = 0; d = bus_rdata;
  endtask

  initial begin
    logic [31:0] d;
    bit both_busy;
    for (int i = 0; i < 1024; i++) begin
      lmem0[i] = 32'h0000_1000 + 32'(i); lmem1[i] = 32'h0000_2000 + 32'(i);
      r0.mem[i] = 32'hE000_0000 + 32'(i); r1.mem[i] = 32'hF000_0000 + 32'(i);
    end
    repeat (3) @(posedge cpu_clk);
    rst_n = 1;
    repeat (3) @(posedge cpu_clk);
    wr(0, CDMAC_REG_SRC, 32'h40); wr(1, CDMAC_REG_SRC, 32'h80);
    rd(0, CDMAC_REG_SRC, d); check("decode conn 0", d == 32'h40);
    rd(1, CDMAC_REG_SRC, d); check("decode conn 1", d == 32'h80);
    wr(0, CDMAC_REG_DST, 32'h0);   wr(0, CDMAC_REG_LEN, 40);
    wr(1, CDMAC_REG_DST, 32'h400); wr(1, CDMAC_REG_LEN, 40);
    wr(0, CDMAC_REG_CMD, 32'(OP_DMA_WRITE));
    wr(1, CDMAC_REG_CMD, 32'(OP_DMA_WRITE));
    both_busy = 0;
    for (int k = 0; k < 20; k++) begin @(posedge clk); if (busy == 2'b11) both_busy = 1; end
    check("controllers run concurrently", both_busy);
    wait (busy == 2'b00);
    repeat (10) @(posedge cpu_clk);
    for (int i = 0; i < 40; i++) begin
      check($sformatf("conn0 word %0d", i), r0.mem[i] == 32'h0000_1000 + 32'(16 + i));
      check($sformatf("conn1 word %0d", i), r1.mem[256 + i] == 32'h0000_2000 + 32'(32 + i));
    end
    check("conn0 bursts", r0.n_wr_cmd == 3);
    check("conn1 bursts", r1.n_wr_cmd == 3);
    // PCT read on connection 1
    wr(1, CDMAC_REG_SRC, 32'(700 * 4)); wr(1, CDMAC_REG_LEN, 4);
    wr(1, CDMAC_REG_CMD, 32'(OP_PCT_READ));
    do rd(1, CDMAC_REG_STATUS, d); while (d[0]);
    for (int i = 0; i < 4; i++) begin
      rd(1, CDMAC_REG_DATA, d);
      check($sformatf("conn1 PCT read %0d", i), d == 32'hF000_0000 + 32'(700 + i));
    end
    check("conn0 made no reads", r0.n_rd_cmd == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
