// True dual-port RAM with a clock per port and byte write enables.
//
// Used for the tile instruction memory (I-Mem), data memory (D-Mem),
// communication memory (C-Mem) and the monitor memory. Each port reads one
// 32-bit word per cycle with one cycle of latency (read-first: a write returns
// the old word) and writes the bytes selected by we. The two ports may be in
// different clock domains, which is where the tile crosses between the tile
// clock and the NoC clock. Writing one word from both ports in the same cycle
// leaves it undefined, as in an FPGA block RAM. The two write processes are
// plain always blocks because both update the one array, the usual form of a
// dual-clock block RAM; the multi-driver note the linter gives for it stands.
// Depth 2**AW words; the default 8192 words is the 32 KB of the tile memories.
module tdp_ram #(
  parameter int AW = 13
) (
  input  logic          clka,
  input  logic          ena,
  input  logic [3:0]    wea,
  input  logic [AW-1:0] addra,
  input  logic [31:0]   dina,
  output logic [31:0]   douta,
  input  logic          clkb,
  input  logic          enb,
  input  logic [3:0]    web,
  input  logic [AW-1:0] addrb,
  input  logic [31:0]   dinb,
  output logic [31:0]   doutb
);
  logic [31:0] mem [2**AW];

  always @(posedge clka) begin
    if (ena) begin
      douta <= mem[addra];
      for (int b = 0; b < 4; b++)
        if (wea[b]) mem[addra][8*b +: 8] <= dina[8*b +: 8];
    end
  end

  always @(posedge clkb) begin
    if (enb) begin
      doutb <= mem[addrb];
      for (int b = 0; b < 4; b++)
        if (web[b]) mem[addrb][8*b +: 8] <= dinb[8*b +: 8];
    end
  end
endmodule
