// Behavioural model of the network on chip for testbenches: N initiator
// connections sharing one DTL target through a TDM slot table.
//
// Slot s of the table is owned by connection SLOT_OWNER[s]; the slot counter
// advances every SLOT_CYCLES cycles. A connection may start a transaction
// only in one of its own slots while the target is free; the transaction
// then runs to its end (a simplification of contention-free routing: it
// keeps the bounded-wait property but not the per-word slot timing). The
// model counts the cycles commands spend waiting for their slot and the
// transactions of each connection. Default: two connections, alternate
// slots of 3 cycles.
// The 3-cycle slot follows the NoC slot size of the platform; the slot table
// and holding a slot until the transaction ends are this model's choices.
module noc_model
  import mpsoc_pkg::*;
#(
  parameter int N = 2,
  parameter int SLOTS = 2,
  parameter int SLOT_CYCLES = 3,
  parameter int SLOT_OWNER [SLOTS] = '{0, 1}
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dtl_m2s_t ini_o [N],
  output dtl_s2m_t ini_i [N],
  output dtl_m2s_t tgt_i,
  input  dtl_s2m_t tgt_o
);
  int slot = 0, sub = 0;
  int owner = -1;          // connection holding the target
  bit in_rd, in_wr;
  int wait_cycles = 0;
  int n_trans [N];
  initial foreach (n_trans[i]) n_trans[i] = 0;

  always @(posedge clk) begin
    if (!rst_n) begin slot <= 0; sub <= 0; end
    else if (sub == SLOT_CYCLES - 1) begin sub <= 0; slot <= (slot + 1) % SLOTS; end
    else sub <= sub + 1;
  end

  // forward the owner's bundle; others see nothing
  always_comb begin
    tgt_i = '0;
    for (int i = 0; i < N; i++) ini_i[i] = '0;
    if (owner >= 0) begin
      tgt_i = ini_o[owner];
      ini_i[owner] = tgt_o;
    end else begin
      // a new command of the slot owner goes straight through
      tgt_i = ini_o[SLOT_OWNER[slot]];
      tgt_i.wr_valid = 0; tgt_i.rd_accept = 0;
      ini_i[SLOT_OWNER[slot]].cmd_accept = tgt_o.cmd_accept;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) owner <= -1;
    else begin
      for (int i = 0; i < N; i++)
        if (ini_o[i].cmd_valid && !(owner < 0 && SLOT_OWNER[slot] == i && tgt_o.cmd_accept))
          wait_cycles <= wait_cycles + 1;
      if (owner < 0) begin
        if (ini_o[SLOT_OWNER[slot]].cmd_valid && tgt_o.cmd_accept) begin
          owner <= SLOT_OWNER[slot];
          n_trans[SLOT_OWNER[slot]] <= n_trans[SLOT_OWNER[slot]] + 1;
          in_rd <= ini_o[SLOT_OWNER[slot]].cmd_read;
          in_wr <= !ini_o[SLOT_OWNER[slot]].cmd_read;
        end
      end else begin
        if (in_rd && tgt_o.rd_valid && ini_o[owner].rd_accept && tgt_o.rd_last) owner <= -1;
        if (in_wr && ini_o[owner].wr_valid && tgt_o.wr_accept && ini_o[owner].wr_last) owner <= -1;
      end
    end
  end
endmodule
