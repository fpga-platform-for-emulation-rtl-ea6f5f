// Frequency generator of the power management unit.
//
// Produces the clock enable of the processing tile from the constant input
// clock. Frequency scaling is emulated by fine-grained clock gating: the
// ce_gen accumulator passes N of every 16 input cycles, so software on the
// tile gets the cycle count of an N/16 clock. Two command streams arrive
// through FIFOs from the processor:
//   * Freq FIFO, control bit clear: bits [3:0] are the new N and bits [31:4]
//     the effective time T2 (aligned to 16). The new N is held pending and
//     takes effect when the system timer equals T2, so the switch moment does
//     not depend on the FIFO latency; the accumulator restarts then.
//   * Freq FIFO, control bit set: gate the clock (the data bits are ignored).
//   * Un-gate FIFO: un-gate time T1; the gate register is cleared when the
//     system timer equals T1.
// Command layouts, the T2/T1 comparison and the gate register follow the
// platform description. Own choices: the 4-bit field value 0 encodes N = 16
// (full speed), so all sixteen steps 1/16..16/16 are reachable; reset starts
// at N = 16, ungated, with no pending switch; a newer frequency word replaces
// a pending one. ce is registered; clk_gate turns it into tile_clk, whose
// rising edge follows one input cycle after ce is high.
module freq_gen
  import mpsoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] timer_value,
  input  logic        freq_empty,
  input  fsl_word_t   freq_data,
  output logic        freq_rd,
  input  logic        ungate_empty,
  input  fsl_word_t   ungate_data,
  output logic        ungate_rd,
  output logic        ce,
  output logic        tile_clk,
  output logic [4:0]  n_active,
  output logic        gated,
  output logic        switch_event   // one cycle pulse when a new N takes effect
);
  logic [4:0]  n_pend;
  logic [31:0] t2;
  logic        pend_valid;
  logic [31:0] t1;
  logic        t1_valid;
  logic        ce_alg;
  logic        do_switch;

  assign freq_rd   = !freq_empty;
  assign ungate_rd = !ungate_empty;
  assign do_switch = pend_valid && (timer_value == t2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_active   <= 5'd16;
      n_pend     <= 5'd16;
      t2         <= '0;
      pend_valid <= 1'b0;
      t1         <= '0;
      t1_valid   <= 1'b0;
      gated      <= 1'b0;
    end else begin
      if (do_switch) begin
        n_active   <= n_pend;
        pend_valid <= 1'b0;
      end
      if (gated && t1_valid && timer_value == t1) begin
        gated    <= 1'b0;
        t1_valid <= 1'b0;
      end
      if (freq_rd) begin
        if (freq_data.ctrl) begin
          gated <= 1'b1;
        end else begin
          n_pend     <= (freq_data.data[3:0] == 4'd0) ? 5'd16 : {1'b0, freq_data.data[3:0]};
          t2         <= {freq_data.data[31:4], 4'b0000};
          pend_valid <= 1'b1;
        end
      end
      if (ungate_rd) begin
        t1       <= ungate_data.data;
        t1_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) switch_event <= 1'b0;
    else        switch_event <= do_switch;
  end

  ce_gen #(.D(FREQ_D)) u_ce (
    .clk(clk), .rst_n(rst_n),
    .n(do_switch ? n_pend : n_active),
    .restart(do_switch),
    .ce(ce_alg)
  );

  assign ce = ce_alg && !gated;

  clk_gate u_gate (.clk(clk), .rst_n(rst_n), .en(ce), .gclk(tile_clk));
endmodule
