// Shared memory tile: a memory behind a DTL target port.
//
// Serves one DTL transaction at a time from the network. A read command of
// block_size+1 words is answered by that many words on the read group, the
// last one marked rd_last; a write command takes block_size+1 words from the
// write group. The memory has one cycle of read latency, so a read returns
// its first word two cycles after the command is accepted, and then one word
// per cycle while the initiator accepts them. Byte addresses are converted to
// word addresses and wrap within the memory. Default size 4096 words = 16 KB,
// the shared memory of the dual-tile configuration. The port timing and the
// one-transaction-at-a-time service are this implementation's choices.
module shared_mem_tile
  import mpsoc_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_m2s_t dtl_i,
  output dtl_s2m_t dtl_o,
  output logic     busy
);
  typedef enum logic [1:0] {T_IDLE, T_RFETCH, T_RSEND, T_WRITE} tstate_e;
  tstate_e       state;
  logic [AW-1:0] addr;
  logic [7:0]    left;     // words left minus one
  logic [31:0]   mem [2**AW];
  logic [31:0]   rword;

  assign busy = (state != T_IDLE);

  always_comb begin
    dtl_o            = '0;
    dtl_o.cmd_accept = (state == T_IDLE);
    dtl_o.wr_accept  = (state == T_WRITE);
    dtl_o.rd_valid   = (state == T_RSEND);
    dtl_o.rd_data    = rword;
    dtl_o.rd_last    = (state == T_RSEND) && (left == 8'd0);
  end

  always_ff @(posedge clk) begin
    if (state == T_WRITE && dtl_i.wr_valid) mem[addr] <= dtl_i.wr_data;
    if (state == T_RFETCH || (state == T_RSEND && dtl_i.rd_accept)) rword <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      addr  <= '0;
      left  <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (dtl_i.cmd_valid) begin
          addr  <= dtl_i.cmd_addr[AW+1:2];
          left  <= dtl_i.cmd_block_size;
          state <= dtl_i.cmd_read ? T_RFETCH : T_WRITE;
        end
        T_RFETCH: begin
          addr  <= addr + AW'(1);
          state <= T_RSEND;
        end
        T_RSEND: if (dtl_i.rd_accept) begin
          if (left == 8'd0) state <= T_IDLE;
          else begin
            left <= left - 8'd1;
            addr <= addr + AW'(1);
          end
        end
        T_WRITE: if (dtl_i.wr_valid) begin
          addr <= addr + AW'(1);
          if (left == 8'd0) state <= T_IDLE;
          else              left  <= left - 8'd1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_wr_last: assert property (@(posedge clk) disable iff (!rst_n)
      state == T_WRITE && dtl_i.wr_valid |-> dtl_i.wr_last == (left == 8'd0));
endmodule
