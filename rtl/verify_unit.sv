// verify_unit: checks the value predictions of a trace skipped by the
// speculation stream.
//
// When a PE hands the speculation stream on to the next PE, it keeps the
// predicted live-out registers of the skipped trace and executes the trace
// itself as a verification stream. Each predicted register is tied to the
// instruction that produces it (PCs field of the trace table), so the check
// is local: when the verification stream retires that instruction, its result
// is compared with the prediction. A mismatch is a misprediction. The
// verification is complete, and the PE can be released, once every predicted
// register has been confirmed and the stream has executed the whole trace
// (end_i). Reaching the end of the trace with a predicted register not
// produced also counts as a misprediction. Local detection follows the design; the load/arm
// handshake, the per-slot bookkeeping and the outcome counters are this
// implementation's choices, and so is the shadow check: when a trace is not
// skipped (its counter says "do not predict", or the next PE is busy), the
// PE executes it itself and the unit checks the predictions anyway, without
// reporting to the ring controller, only to train the trace's 2-bit counter.
// Without it a counter below the threshold could never rise again.
//
// Interface and timing:
//   clear_i          forget the loaded slots (start of a new prediction)
//   load_valid_i     append one predicted register (slot order)
//   arm_i            start verifying the loaded slots with trace start arm_pc_i;
//                    shadow_i (sampled with arm_i) makes it a shadow check
//   squash_i         abandon the verification (no result)
//   ret_*            retire stream of the verification stream, one per cycle
//   end_i            the stream has executed the last instruction of the trace
//   mispredict_o     (not in a shadow check) one-cycle pulse, registered, the
//                    cycle after the retirement of the wrong value; the unit
//                    then disarms. A retirement in the arming cycle is checked.
//   done_o           (not in a shadow check) one-cycle pulse, registered, the cycle after the last
//                    pending value was confirmed
//   train_*          matching pulse for the trace table's 2-bit counter
//   n_correct_o / n_incorrect_o  count confirmed and wrong values
module verify_unit
  import contrail_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear_i,
  input  logic      load_valid_i,
  input  reg_pred_t load_i,
  input  logic      arm_i,
  input  pc_t       arm_pc_i,
  input  logic      shadow_i,
  input  logic      squash_i,
  input  logic      ret_valid_i,
  input  pc_t       ret_pc_i,
  input  rid_t      ret_rid_i,
  input  word_t     ret_value_i,
  input  logic      end_i,
  output logic      active_o,
  output logic      mispredict_o,
  output logic      done_o,
  output logic      train_valid_o,
  output pc_t       train_pc_o,
  output logic      train_correct_o,
  output logic [NREGW-1:0] nloaded_o,
  output reg_pred_t [MAX_REGS-1:0] slots_o,
  output logic [31:0] n_correct_o,
  output logic [31:0] n_incorrect_o
);
  reg_pred_t [MAX_REGS-1:0] slot;
  logic [MAX_REGS-1:0]      pending;
  logic [NREGW-1:0]         nloaded;
  logic                     active;
  logic                     shadow;
  logic                     ended;
  pc_t                      trace_pc;

  // The unit is already checking in the cycle it is armed, so a retirement in
  // that cycle is not lost.
  logic                     act_now, shadow_now;
  logic [MAX_REGS-1:0]      pend_now;
  always_comb begin
    act_now    = active || (arm_i && !squash_i);
    shadow_now = active ? shadow : shadow_i;
    pend_now   = pending;
    if (!active)
      for (int i = 0; i < MAX_REGS; i++) pend_now[i] = arm_i && (i < int'(nloaded));
  end

  // match of the retiring instruction against the pending slots
  logic                     hit, wrong;
  always_comb begin
    hit   = 1'b0;
    wrong = 1'b0;
    for (int i = 0; i < MAX_REGS; i++)
      if (pend_now[i] && slot[i].pc == ret_pc_i) begin
        hit = 1'b1;
        if (slot[i].rid != ret_rid_i || slot[i].value != ret_value_i) wrong = 1'b1;
      end
    hit = hit && ret_valid_i && act_now;
  end

  logic [MAX_REGS-1:0] pend_next;
  logic                ended_next;
  always_comb begin
    pend_next  = (hit && !wrong) ? (pend_now & ~matchmask(ret_pc_i)) : pend_now;
    ended_next = (active && ended) || end_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot          <= '0;
      pending       <= '0;
      nloaded       <= '0;
      active        <= 1'b0;
      shadow        <= 1'b0;
      ended         <= 1'b0;
      trace_pc      <= '0;
      mispredict_o  <= 1'b0;
      done_o        <= 1'b0;
      train_valid_o <= 1'b0;
      train_correct_o <= 1'b0;
      n_correct_o   <= '0;
      n_incorrect_o <= '0;
    end else begin
      mispredict_o  <= 1'b0;
      done_o        <= 1'b0;
      train_valid_o <= 1'b0;
      if (squash_i) begin
        active  <= 1'b0;
        pending <= '0;
      end else if (act_now) begin
        trace_pc <= active ? trace_pc : arm_pc_i;
        shadow   <= shadow_now;
        if (hit && !wrong) n_correct_o <= n_correct_o + 1;
        if ((hit && wrong) || (end_i && pend_next != '0)) begin
          // wrong value, or the trace ended without producing a register
          n_incorrect_o   <= n_incorrect_o + 1;
          mispredict_o    <= !shadow_now;
          train_valid_o   <= 1'b1;
          train_correct_o <= 1'b0;
          active          <= 1'b0;
          pending         <= '0;
        end else if (ended_next && pend_next == '0) begin
          done_o          <= !shadow_now;
          train_valid_o   <= 1'b1;
          train_correct_o <= 1'b1;
          active          <= 1'b0;
          pending         <= '0;
        end else begin
          active  <= 1'b1;
          pending <= pend_next;
          ended   <= ended_next;
        end
      end
      if (clear_i) begin
        nloaded <= '0;
      end else if (load_valid_i && nloaded < NREGW'(MAX_REGS)) begin
        slot[nloaded[$clog2(MAX_REGS)-1:0]] <= load_i;
        nloaded <= nloaded + 1'b1;
      end
    end
  end

  function automatic logic [MAX_REGS-1:0] matchmask(pc_t pc);
    logic [MAX_REGS-1:0] m;
    for (int i = 0; i < MAX_REGS; i++) m[i] = (slot[i].pc == pc);
    return m;
  endfunction

  assign active_o   = active;
  assign train_pc_o = trace_pc;
  assign nloaded_o  = nloaded;
  assign slots_o    = slot;

  // The unit is armed only with something to verify.
  assert property (@(posedge clk) disable iff (!rst_n) arm_i |-> nloaded != '0);

endmodule
