// Connection DMA controller (CDMAC): one per outgoing NoC connection.
//
// Lets the processor use a NoC connection without waiting on the network.
// Two kinds of transaction are supported, as in the platform description:
//   * processor controlled (PCT): the processor writes words into, or reads
//     words out of, a data buffer inside the controller; the controller moves
//     them to or from the remote address in one DTL transaction of at most
//     BURST words;
//   * DMA: the controller moves LEN words between the tile memory and the
//     remote address by itself, cut into DTL transactions of at most BURST
//     words, while the processor does other work.
// Processor side (clk_tile): a register port, word offsets SRC, DST, LEN,
// CMD (writing the operation code starts the transaction), STATUS (bit 0
// busy, bit 1 read buffer holds data, bit 2 write buffer full) and DATA
// (write pushes to the write buffer, read pops the read buffer). Reads return
// on the next clk_tile edge. Software checks busy before programming, sets
// the addresses and sends the command (for a PCT write the data then follows
// through DATA), and must do this atomically.
// NoC side (clk_noc): a DTL initiator port and a port to the local memory
// (one-cycle read latency, word addresses taken from the byte address).
// The controller runs at the NoC clock so a transaction keeps its speed when
// the task that started it is swapped out and the tile frequency changes.
// The command, write buffer and read buffer are dual-clock FIFOs; busy is a
// toggle returned through a synchronizer. Register map, command encoding,
// burst cutting and the FSM states are choices of this implementation; a DMA
// write moves one word every two cycles (read, then send).
module cdmac
  import mpsoc_pkg::*;
#(
  parameter int BURST     = 32,   // max words per DTL transaction
  parameter int BUF_DEPTH = 32,   // PCT data buffer depth (words)
  parameter int MEM_AW    = 13    // local memory word address width
) (
  input  logic              clk_tile,
  input  logic              clk_noc,
  input  logic              rst_n,
  // processor register port
  input  logic              reg_req,
  input  logic              reg_we,
  input  logic [2:0]        reg_addr,
  input  logic [31:0]       reg_wdata,
  output logic [31:0]       reg_rdata,
  // DTL initiator
  output dtl_m2s_t          dtl_o,
  input  dtl_s2m_t          dtl_i,
  // local memory port
  output logic              mem_en,
  output logic [3:0]        mem_we,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  // observation
  output logic              busy_noc
);
  // ---------------- processor side ----------------
  logic [31:0] src_r, dst_r;
  logic [15:0] len_r;
  logic        req_tog, done_tog_s;
  logic        cmdq_full, wbuf_full, rbuf_empty;
  logic [31:0] rbuf_q;
  cdmac_cmd_t  cmd_w;
  logic        cmd_push, wbuf_push, rbuf_pop;
  logic        busy_t;

  assign busy_t    = req_tog ^ done_tog_s;
  assign cmd_push  = reg_req && reg_we && reg_addr == CDMAC_REG_CMD && !cmdq_full;
  assign wbuf_push = reg_req && reg_we && reg_addr == CDMAC_REG_DATA;
  assign rbuf_pop  = reg_req && !reg_we && reg_addr == CDMAC_REG_DATA && !rbuf_empty;
  assign cmd_w     = '{op: cdmac_op_e'(reg_wdata[1:0]), src: src_r, dst: dst_r, len: len_r};

  always_ff @(posedge clk_tile or negedge rst_n) begin
    if (!rst_n) begin
      src_r     <= '0;
      dst_r     <= '0;
      len_r     <= '0;
      req_tog   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      if (reg_req && reg_we) begin
        unique case (reg_addr)
          CDMAC_REG_SRC: src_r <= reg_wdata;
          CDMAC_REG_DST: dst_r <= reg_wdata;
          CDMAC_REG_LEN: len_r <= reg_wdata[15:0];
          default: ;
        endcase
      end
      if (cmd_push) req_tog <= ~req_tog;
      if (reg_req && !reg_we) begin
        unique case (reg_addr)
          CDMAC_REG_SRC:    reg_rdata <= src_r;
          CDMAC_REG_DST:    reg_rdata <= dst_r;
          CDMAC_REG_LEN:    reg_rdata <= {16'd0, len_r};
          CDMAC_REG_STATUS: reg_rdata <= {29'd0, wbuf_full, !rbuf_empty, busy_t | cmd_push};
          CDMAC_REG_DATA:   reg_rdata <= rbuf_empty ? 32'd0 : rbuf_q;
          default:          reg_rdata <= '0;
        endcase
      end
    end
  end

  // ---------------- clock domain crossing ----------------
  cdmac_cmd_t cmd_q;
  logic       cmdq_empty, cmd_pop;
  logic [31:0] wbuf_q;
  logic       wbuf_empty, wbuf_pop;
  logic       rbuf_full, rbuf_push;
  logic [31:0] rbuf_d;
  logic       done_tog;

  async_fifo #(.WIDTH($bits(cdmac_cmd_t)), .DEPTH(4)) u_cmdq (
    .wclk(clk_tile), .wrst_n(rst_n), .wr_en(cmd_push), .wdata(cmd_w), .full(cmdq_full),
    .rclk(clk_noc), .rrst_n(rst_n), .rd_en(cmd_pop), .rdata(cmd_q), .empty(cmdq_empty));
  async_fifo #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_wbuf (
    .wclk(clk_tile), .wrst_n(rst_n), .wr_en(wbuf_push), .wdata(reg_wdata), .full(wbuf_full),
    .rclk(clk_noc), .rrst_n(rst_n), .rd_en(wbuf_pop), .rdata(wbuf_q), .empty(wbuf_empty));
  async_fifo #(.WIDTH(32), .DEPTH(BUF_DEPTH)) u_rbuf (
    .wclk(clk_noc), .wrst_n(rst_n), .wr_en(rbuf_push), .wdata(rbuf_d), .full(rbuf_full),
    .rclk(clk_tile), .rrst_n(rst_n), .rd_en(rbuf_pop), .rdata(rbuf_q), .empty(rbuf_empty));
  sync2ff u_done_sync (.clk(clk_tile), .rst_n(rst_n), .d(done_tog), .q(done_tog_s));

  // ---------------- NoC side FSM ----------------
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_RD, S_WR, S_MRD, S_MWAIT, S_DONE} state_e;
  state_e      state;
  cdmac_op_e   op;
  logic [31:0] raddr;      // remote byte address of the current burst
  logic [31:0] laddr;      // local byte address of the next word
  logic [15:0] remain;     // words left after the current burst
  logic [7:0]  bcnt;       // words done in the current burst
  logic [7:0]  blen;       // words in the current burst minus one
  logic [31:0] hold;       // local word staged for a DMA write

  localparam logic [15:0] BURST16 = 16'(BURST);

  logic        is_read;
  logic [15:0] this_burst;
  assign is_read    = (op == OP_PCT_READ) || (op == OP_DMA_READ);
  assign this_burst = (remain > BURST16) ? BURST16 : remain;

  assign cmd_pop  = (state == S_IDLE) && !cmdq_empty;
  assign busy_noc = (state != S_IDLE);

  always_comb begin
    dtl_o          = '0;
    dtl_o.cmd_addr = raddr;
    dtl_o.cmd_read = is_read;
    dtl_o.cmd_block_size = 8'(this_burst - 16'd1);
    mem_en    = 1'b0;
    mem_we    = '0;
    mem_addr  = laddr[MEM_AW+1:2];
    mem_wdata = dtl_i.rd_data;
    wbuf_pop  = 1'b0;
    rbuf_push = 1'b0;
    rbuf_d    = dtl_i.rd_data;
    unique case (state)
      S_CMD: dtl_o.cmd_valid = 1'b1;
      S_RD: begin
        if (op == OP_PCT_READ) begin
          dtl_o.rd_accept = !rbuf_full;
          rbuf_push       = dtl_i.rd_valid && !rbuf_full;
        end else begin
          dtl_o.rd_accept = 1'b1;
          mem_en          = dtl_i.rd_valid;
          mem_we          = {4{dtl_i.rd_valid}};
        end
      end
      S_WR: begin
        dtl_o.wr_last = (bcnt == blen);
        if (op == OP_PCT_WRITE) begin
          dtl_o.wr_valid = !wbuf_empty;
          dtl_o.wr_data  = wbuf_q;
          wbuf_pop       = !wbuf_empty && dtl_i.wr_accept;
        end else begin
          dtl_o.wr_valid = 1'b1;
          dtl_o.wr_data  = hold;
        end
      end
      S_MRD: mem_en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk_noc or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op       <= OP_PCT_READ;
      raddr    <= '0;
      laddr    <= '0;
      remain   <= '0;
      bcnt     <= '0;
      blen     <= '0;
      hold     <= '0;
      done_tog <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_pop) begin
          op    <= cmd_q.op;
          raddr <= (cmd_q.op == OP_PCT_READ || cmd_q.op == OP_DMA_READ) ? cmd_q.src : cmd_q.dst;
          laddr <= (cmd_q.op == OP_DMA_WRITE) ? cmd_q.src : cmd_q.dst;
          // processor controlled transactions are one burst at most
          remain <= (cmd_q.op == OP_PCT_READ || cmd_q.op == OP_PCT_WRITE) && cmd_q.len > BURST16
                    ? BURST16 : cmd_q.len;
          state  <= (cmd_q.len == 16'd0) ? S_DONE : S_CMD;
        end
        S_CMD: begin
          blen <= 8'(this_burst - 16'd1);
          bcnt <= '0;
          if (dtl_i.cmd_accept) begin
            remain <= remain - this_burst;
            state  <= is_read ? S_RD : (op == OP_DMA_WRITE ? S_MRD : S_WR);
          end
        end
        S_RD: if (dtl_i.rd_valid && dtl_o.rd_accept) begin
          bcnt  <= bcnt + 8'd1;
          laddr <= laddr + 32'd4;
          if (dtl_i.rd_last) begin
            raddr <= raddr + 32'({bcnt + 8'd1, 2'b00});
            state <= (remain == 16'd0) ? S_DONE : S_CMD;
          end
        end
        S_MRD: begin
          laddr <= laddr + 32'd4;
          state <= S_MWAIT;
        end
        S_MWAIT: begin
          hold  <= mem_rdata;
          state <= S_WR;
        end
        S_WR: if (dtl_o.wr_valid && dtl_i.wr_accept) begin
          bcnt <= bcnt + 8'd1;
          if (bcnt == blen) begin
            raddr <= raddr + 32'({bcnt + 8'd1, 2'b00});
            state <= (remain == 16'd0) ? S_DONE : S_CMD;
          end else if (op == OP_DMA_WRITE) begin
            state <= S_MRD;
          end
        end
        S_DONE: begin
          done_tog <= ~done_tog;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // DTL handshake rules
  a_cmd_stable: assert property (@(posedge clk_noc) disable iff (!rst_n)
      dtl_o.cmd_valid && !dtl_i.cmd_accept |=> dtl_o.cmd_valid && $stable(dtl_o.cmd_addr));
  a_wr_stable: assert property (@(posedge clk_noc) disable iff (!rst_n)
      dtl_o.wr_valid && !dtl_i.wr_accept |=> dtl_o.wr_valid && $stable(dtl_o.wr_data));
endmodule
