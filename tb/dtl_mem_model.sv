// Behavioural DTL target memory for testbenches.
//
// Serves one DTL transaction at a time with random stalls on every handshake
// (command accept, write accept, read valid), so initiators are exercised
// with back-pressure. Counts read and write commands, checks that wr_last
// marks the last word of each write burst, and records the largest burst.
// The memory array `mem` (word addressed) is open to hierarchical access.
// The handshake it checks is the reduced DTL of this design, not the full
// DTL specification.
module dtl_mem_model
  import mpsoc_pkg::*;
#(
  parameter int AW = 12,
  parameter int STALL_PCT = 30
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_m2s_t req,
  output dtl_s2m_t rsp
);
  logic [31:0] mem [2**AW];
  int n_rd_cmd = 0, n_wr_cmd = 0, max_burst = 0, proto_err = 0;
  typedef enum {M_IDLE, M_RD, M_WR} mstate_e;
  mstate_e st = M_IDLE;
  logic [AW-1:0] addr;
  int left;
  logic go_cmd, go_wr, go_rd;

  always @(negedge clk) begin
    go_cmd = ($urandom % 100) >= STALL_PCT;
    go_wr  = ($urandom % 100) >= STALL_PCT;
    go_rd  = ($urandom % 100) >= STALL_PCT;
    rsp = '0;
    rsp.cmd_accept = (st == M_IDLE) && go_cmd;
    rsp.wr_accept  = (st == M_WR) && go_wr;
    rsp.rd_valid   = (st == M_RD) && go_rd;
    rsp.rd_data    = mem[addr];
    rsp.rd_last    = (st == M_RD) && left == 0;
  end

  always @(posedge clk) begin
    if (!rst_n) st <= M_IDLE;
    else case (st)
      M_IDLE: if (req.cmd_valid && rsp.cmd_accept) begin
        addr <= req.cmd_addr[AW+1:2];
        left <= int'(req.cmd_block_size);
        if (int'(req.cmd_block_size) + 1 > max_burst) max_burst <= int'(req.cmd_block_size) + 1;
        if (req.cmd_read) begin st <= M_RD; n_rd_cmd <= n_rd_cmd + 1; end
        else begin st <= M_WR; n_wr_cmd <= n_wr_cmd + 1; end
      end
      M_RD: if (rsp.rd_valid && req.rd_accept) begin
        addr <= addr + 1;
        left <= left - 1;
        if (left == 0) st <= M_IDLE;
      end
      M_WR: if (rsp.wr_accept && req.wr_valid) begin
        mem[addr] <= req.wr_data;
        addr <= addr + 1;
        left <= left - 1;
        if (req.wr_last != (left == 0)) proto_err <= proto_err + 1;
        if (left == 0) st <= M_IDLE;
      end
      default: st <= M_IDLE;
    endcase
  end
endmodule
