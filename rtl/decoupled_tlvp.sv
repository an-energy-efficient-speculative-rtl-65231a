// decoupled_tlvp: decoupled trace-level value predictor.
//
// Trace information is kept apart from value information. A lookup of a trace
// start address reads the trace table (TT); if the trace hits, the
// instruction-level value predictor is referenced
// once per register of the trace, one register per cycle, with the address of
// the instruction that produces that register (the PCs field). The predictor
// therefore needs only one value port however many registers a trace has, at
// the price of several cycles per trace. The 2-bit counter of the trace
// decides whether the prediction is used (done_predicted_o); the values are
// produced either way, so that a trace that is not skipped can still be
// checked and its counter trained. This structure follows the design;
// the handshake and the exact cycle counts are this implementation's.
//
// Timing, for a request accepted in cycle 0 (req_valid_i && req_ready_o):
//   cycle 1      TT result; if the trace misses (or has no registers),
//                done_valid_o with done_predicted_o = 0 and done_nregs_o = 0.
//   cycles 2..n+1 value predictor referenced for registers 0..n-1
//   cycles 3..n+2 val_valid_o with one reg_pred_t per cycle, in slot order
//   cycle n+2    done_valid_o, alongside the last value; done_predicted_o is
//                1 when the trace's 2-bit counter is 2 or more
// A trace with n registers thus takes n+2 cycles.
// The value predictor is trained through the upd_* port (one retired
// instruction per cycle), the TT through wr_* (install) and tr_* (2bC).
module decoupled_tlvp
  import contrail_pkg::*;
#(
  parameter int TT_ENTRIES  = 1024,
  parameter int VHT_ENTRIES = 4096,
  parameter int HIST_P      = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // prediction request
  input  logic        req_valid_i,
  input  pc_t         req_pc_i,
  output logic        req_ready_o,
  // predicted registers, one per cycle
  output logic        val_valid_o,
  output reg_pred_t   val_o,
  output logic        val_conf_o,
  // end of a request
  output logic        done_valid_o,
  output logic        done_predicted_o,
  output pc_t         done_next_pc_o,
  output logic [NREGW-1:0] done_nregs_o,
  // value predictor training
  input  logic        upd_valid_i,
  input  pc_t         upd_pc_i,
  input  word_t       upd_value_i,
  // trace table install and training
  input  logic        wr_valid_i,
  input  pc_t         wr_pc_i,
  input  trace_info_t wr_info_i,
  input  logic        tr_valid_i,
  input  pc_t         tr_pc_i,
  input  logic        tr_correct_i
);
  typedef enum logic [1:0] {S_IDLE, S_LOOKUP, S_ISSUE, S_DRAIN} state_e;
  state_e state;

  logic        tt_valid, tt_hit, tt_predict;
  trace_info_t tt_info, info_q;
  logic        pred_q;
  logic [NREGW-1:0] k_issue, k_out;

  logic  vp_pvalid, vp_phit, vp_pconf;
  word_t vp_pvalue;
  logic  vp_req;
  pc_t   vp_pc;

  trace_table #(.TT_ENTRIES(TT_ENTRIES)) u_tt (
    .clk, .rst_n,
    .lk_valid_i (req_valid_i && req_ready_o),
    .lk_pc_i    (req_pc_i),
    .lk_valid_o (tt_valid),
    .lk_hit_o   (tt_hit),
    .lk_predict_o (tt_predict),
    .lk_info_o  (tt_info),
    .wr_valid_i, .wr_pc_i, .wr_info_i,
    .tr_valid_i, .tr_pc_i, .tr_correct_i
  );

  value_predictor #(.VHT_ENTRIES(VHT_ENTRIES), .HIST_P(HIST_P)) u_vp (
    .clk, .rst_n,
    .pred_valid_i (vp_req),
    .pred_pc_i    (vp_pc),
    .pred_valid_o (vp_pvalid),
    .pred_hit_o   (vp_phit),
    .pred_conf_o  (vp_pconf),
    .pred_value_o (vp_pvalue),
    .upd_valid_i, .upd_pc_i, .upd_value_i
  );

  assign req_ready_o = (state == S_IDLE);
  assign vp_req      = (state == S_ISSUE);
  assign vp_pc       = info_q.pcs[k_issue[$clog2(MAX_REGS)-1:0]];

  logic lookup_go;
  assign lookup_go = tt_valid && tt_hit && (tt_info.nregs != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      info_q  <= '0;
      pred_q  <= 1'b0;
      k_issue <= '0;
      k_out   <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (req_valid_i) state <= S_LOOKUP;
        S_LOOKUP: begin
          info_q  <= tt_info;
          pred_q  <= tt_predict;
          k_issue <= '0;
          k_out   <= '0;
          state   <= lookup_go ? S_ISSUE : S_IDLE;
        end
        S_ISSUE: begin
          k_issue <= k_issue + 1'b1;
          if (k_issue + 1'b1 == info_q.nregs) state <= S_DRAIN;
        end
        S_DRAIN:  state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
      if (vp_pvalid) k_out <= k_out + 1'b1;
    end
  end

  // Value stream: the predictor answers one cycle after each reference.
  assign val_valid_o = vp_pvalid;
  assign val_conf_o  = vp_pconf && vp_phit;
  assign val_o       = '{rid:   info_q.rids[k_out[$clog2(MAX_REGS)-1:0]],
                         pc:    info_q.pcs[k_out[$clog2(MAX_REGS)-1:0]],
                         value: vp_pvalue};

  always_comb begin
    done_valid_o     = 1'b0;
    done_predicted_o = 1'b0;
    done_next_pc_o   = info_q.next_pc;
    done_nregs_o     = info_q.nregs;
    if (state == S_LOOKUP && !lookup_go) begin
      done_valid_o   = 1'b1;
      done_next_pc_o = tt_info.next_pc;
      done_nregs_o   = '0;
    end else if (state == S_DRAIN) begin
      done_valid_o     = 1'b1;
      done_predicted_o = pred_q;
    end
  end

  // The value stream only runs while a trace is being predicted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   val_valid_o |-> (state == S_ISSUE || state == S_DRAIN));

endmodule
