// Self-checking testbench of tdp_ram: two ports on unrelated clocks write
// random words with random byte enables into separate halves of a small
// memory; each port then reads back both halves and compares with a shadow
// copy. Read-first behaviour and the one-cycle read latency are checked.
module tb_tdp_ram;
  localparam int AW = 6;
  logic clka = 0, clkb = 0;
  always #5 clka = ~clka;
  always #7 clkb = ~clkb;
  int checks = 0, failures = 0;
  logic ena, enb;
  logic [3:0] wea, web;
  logic [AW-1:0] addra, addrb;
  logic [31:0] dina, dinb, douta, doutb;
  logic [31:0] shadow [2**AW];
  tdp_ram #(.AW(AW)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr_a(input logic [AW-1:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clka); ena = 1; wea = be; addra = a; dina = d;
    @(posedge clka); #1 ena = 0; wea = 0;
    for (int b = 0; b < 4; b++) if (be[b]) shadow[a][8*b +: 8] = d[8*b +: 8];
  endtask
  task automatic wr_b(input logic [AW-1:0] a, input logic [31:0] d, input logic [3:0] be);
    @(negedge clkb); enb = 1; web = be; addrb = a; dinb = d;
    @(posedge clkb); #1 enb = 0; web = 0;
    for (int b = 0; b < 4; b++) if (be[b]) shadow[a][8*b +: 8] = d[8*b +: 8];
  endtask

  initial begin
    ena = 0; enb = 0; wea = 0; web = 0; addra = 0; addrb = 0; dina = 0; dinb = 0;
    // initialise every word from port A
    for (int i = 0; i < 2**AW; i++) wr_a(AW'(i), 32'h1000 + 32'(i), 4'hF);
    fork
      for (int i = 0; i < 100; i++) wr_a(AW'($urandom % 32), $urandom, 4'($urandom));
      for (int i = 0; i < 100; i++) wr_b(AW'(32 + $urandom % 32), $urandom, 4'($urandom));
    join
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clka); ena = 1; addra = AW'(i);
      @(posedge clka); #1 ena = 0;
      checks++;
      if (douta !== shadow[i]) begin failures++; $display("FAIL A[%0d]=%h exp %h", i, douta, shadow[i]); end
      @(negedge clkb); enb = 1; addrb = AW'(i);
      @(posedge clkb); #1 enb = 0;
      checks++;
      if (doutb !== shadow[i]) begin failures++; $display("FAIL B[%0d]=%h exp %h", i, doutb, shadow[i]); end
    end
    // read-first: a write returns the old word
    @(negedge clka); ena = 1; wea = 4'hF; addra = 3; dina = 32'hDEADBEEF;
    @(posedge clka); #1 ena = 0; wea = 0;
    checks++;
    if (douta !== shadow[3]) begin failures++; $display("FAIL read-first %h", douta); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
