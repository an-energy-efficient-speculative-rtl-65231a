// contrail_pe: one processing element of the Contrail ring, less its datapath.
//
// The PE holds the decoupled trace-level value predictor, the unit that
// verifies the predictions of a skipped trace, and the voltage/frequency
// controller; its datapath, trace cache and data cache sit outside and are
// reached through the dp_* ports. While the PE runs the speculation stream,
// the datapath offers trace start addresses (dp_lookup_*). If the predictor
// predicts the trace, the predicted live-out registers are kept in the
// verification unit and the PE asks the ring controller to spawn. On a grant
// the predicted registers and the address after the trace travel over the
// ring to the next PE, which continues the speculation stream from there,
// and this PE drops to low-speed mode and executes the trace as a
// verification stream (dp_skip_o). If the trace is not predicted or the spawn
// is refused, the datapath just executes the trace (dp_noskip_o) and the
// predictions are checked in the shadow (see verify_unit) to train the
// trace's 2-bit counter. Retired instructions train the value predictor and
// are checked against the predictions; the outcome of a real verification is
// also reported to the ring controller. A new lookup waits until the check of
// the previous trace has ended.
// This division of work follows the design; the port protocol is this
// implementation's.
//
// Timing: a lookup accepted in cycle 0 of a hitting trace with n registers
// ends in cycle n+2, with spawn_req_o if the trace is predicted. In cycle n+3
// the check is armed and the datapath is told dp_skip_o (spawn granted in
// n+2, ring_out_valid_o in the same cycle) or dp_noskip_o; a missing trace
// gives dp_noskip_o in cycle 1. The datapath waits at the trace start until
// then, and may retire the trace's first instruction in the same cycle. dp_start_o follows
// ring_in_valid_i combinationally.
module contrail_pe
  import contrail_pkg::*;
#(
  parameter int TT_ENTRIES  = 1024,
  parameter int VHT_ENTRIES = 4096,
  parameter int HIST_P      = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // datapath: trace start candidates of the speculation stream
  input  logic        dp_lookup_valid_i,
  input  pc_t         dp_lookup_pc_i,
  output logic        dp_lookup_ready_o,
  output logic        dp_skip_o,       // trace handed over: verify it, stop at dp_stop_pc_o
  output logic        dp_noskip_o,     // execute the trace normally
  output pc_t         dp_stop_pc_o,
  // datapath: retired instructions with a register result
  input  logic        dp_ret_valid_i,
  input  pc_t         dp_ret_pc_i,
  input  rid_t        dp_ret_rid_i,
  input  word_t       dp_ret_value_i,
  input  logic        dp_trace_end_i,  // last instruction of the current trace retired
  // datapath: trace construction (installs traces in the trace table)
  input  logic        dp_tt_wr_valid_i,
  input  pc_t         dp_tt_wr_pc_i,
  input  trace_info_t dp_tt_wr_info_i,
  // datapath: start of a speculation stream received over the ring
  output logic        dp_start_o,
  output spawn_pkt_t  dp_start_pkt_o,
  // ring controller
  input  pe_state_e   state_i,
  input  speed_mode_e mode_i,
  output logic        spawn_req_o,
  input  logic        spawn_grant_i,
  input  logic        squash_i,
  output logic        mispredict_o,
  output logic        verify_done_o,
  // ring link
  output logic        ring_out_valid_o,
  output spawn_pkt_t  ring_out_o,
  input  logic        ring_in_valid_i,
  input  spawn_pkt_t  ring_in_i,
  // voltage / clock
  output logic        clk_en_o,
  output logic [10:0] vdd_mv_o,
  output logic [9:0]  freq_mhz_o,
  // statistics
  output logic [31:0] n_correct_o,
  output logic [31:0] n_incorrect_o
);
  logic        req_ready, req_fire;
  logic        val_valid, val_conf;
  reg_pred_t   val;
  logic        done_valid, done_pred;
  pc_t         done_next_pc;
  logic [NREGW-1:0] done_nregs;

  logic        tr_valid, tr_correct;
  pc_t         tr_pc;
  pc_t         trace_pc_q, next_pc_q;
  logic        grant_q, arm_q, shadow_q, v_active;
  logic [NREGW-1:0] nloaded;
  reg_pred_t [MAX_REGS-1:0] slots;

  assign dp_lookup_ready_o = req_ready && (state_i == PE_SPEC) && !v_active && !arm_q;
  assign req_fire          = dp_lookup_valid_i && dp_lookup_ready_o;

  decoupled_tlvp #(.TT_ENTRIES(TT_ENTRIES), .VHT_ENTRIES(VHT_ENTRIES), .HIST_P(HIST_P)) u_tlvp (
    .clk, .rst_n,
    .req_valid_i      (req_fire),
    .req_pc_i         (dp_lookup_pc_i),
    .req_ready_o      (req_ready),
    .val_valid_o      (val_valid),
    .val_o            (val),
    .val_conf_o       (val_conf),
    .done_valid_o     (done_valid),
    .done_predicted_o (done_pred),
    .done_next_pc_o   (done_next_pc),
    .done_nregs_o     (done_nregs),
    .upd_valid_i      (dp_ret_valid_i),
    .upd_pc_i         (dp_ret_pc_i),
    .upd_value_i      (dp_ret_value_i),
    .wr_valid_i       (dp_tt_wr_valid_i),
    .wr_pc_i          (dp_tt_wr_pc_i),
    .wr_info_i        (dp_tt_wr_info_i),
    .tr_valid_i       (tr_valid),
    .tr_pc_i          (tr_pc),
    .tr_correct_i     (tr_correct)
  );

  verify_unit u_verify (
    .clk, .rst_n,
    .clear_i        (req_fire),
    .load_valid_i   (val_valid),
    .load_i         (val),
    .arm_i          (arm_q),
    .arm_pc_i       (trace_pc_q),
    .shadow_i       (shadow_q),
    .squash_i       (squash_i),
    .ret_valid_i    (dp_ret_valid_i),
    .ret_pc_i       (dp_ret_pc_i),
    .ret_rid_i      (dp_ret_rid_i),
    .ret_value_i    (dp_ret_value_i),
    .end_i          (dp_trace_end_i),
    .active_o       (v_active),
    .mispredict_o   (mispredict_o),
    .done_o         (verify_done_o),
    .train_valid_o  (tr_valid),
    .train_pc_o     (tr_pc),
    .train_correct_o(tr_correct),
    .nloaded_o      (nloaded),
    .slots_o        (slots),
    .n_correct_o,
    .n_incorrect_o
  );

  dvfs_ctrl u_dvfs (
    .clk, .rst_n,
    .mode_i      (mode_i),
    .clk_en_o,
    .vdd_mv_o,
    .freq_mhz_o,
    .freq_mode_o (),
    .ready_o     ()
  );

  // spawn handshake
  assign spawn_req_o = done_valid && done_pred && (state_i == PE_SPEC);
  // a missing trace goes on at once; a trace that is checked in the shadow
  // goes on when the check is armed
  assign dp_noskip_o = (done_valid && done_nregs == '0) || (arm_q && shadow_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trace_pc_q <= '0;
      next_pc_q  <= '0;
      grant_q    <= 1'b0;
      arm_q      <= 1'b0;
      shadow_q   <= 1'b0;
    end else begin
      arm_q    <= done_valid && (done_nregs != '0) && (state_i == PE_SPEC) && !squash_i;
      shadow_q <= !(spawn_req_o && spawn_grant_i);
      if (req_fire)   trace_pc_q <= dp_lookup_pc_i;
      if (done_valid) next_pc_q  <= done_next_pc;
      grant_q <= spawn_req_o && spawn_grant_i;
    end
  end

  assign dp_skip_o    = grant_q;
  assign dp_stop_pc_o = next_pc_q;

  // packet for the next PE: the predicted registers and where to resume
  always_comb begin
    ring_out_o          = '0;
    ring_out_o.start_pc = next_pc_q;
    ring_out_o.nregs    = nloaded;
    for (int i = 0; i < MAX_REGS; i++) begin
      ring_out_o.rids[i]   = slots[i].rid;
      ring_out_o.values[i] = slots[i].value;
    end
  end
  assign ring_out_valid_o = grant_q;

  assign dp_start_o     = ring_in_valid_i;
  assign dp_start_pkt_o = ring_in_i;

endmodule
