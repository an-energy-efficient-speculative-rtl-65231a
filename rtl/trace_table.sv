// trace_table: the trace table (TT) of the decoupled trace-level value predictor.
//
// Each entry describes one trace: a tag, a 2-bit saturating up/down counter
// (2bC) that decides whether a prediction is initiated, the address of the
// first instruction after the trace (nextPC), the identifiers of the registers
// the trace produces, and for each of them the address of the instruction
// that produces it (PCs). The field list follows the design; the table is
// direct-mapped on the trace start address, and its size, MAX_REGS slots per
// trace, the counter's start value (1, weakly "do not predict") and the
// threshold (2bC >= 2 predicts) are this implementation's choices.
//
// Interface and timing:
//   lookup: lk_valid_i/lk_pc_i in cycle t; lk_valid_o, lk_hit_o,
//           lk_predict_o (hit and 2bC >= 2) and lk_info_o registered at the
//           end of cycle t.
//   write : wr_valid_i installs a trace built elsewhere (2bC := 1).
//   train : tr_valid_i with tr_correct_i moves the 2bC of a hitting trace up
//           (prediction verified) or down (misprediction). A write to the
//           same entry in the same cycle takes precedence.
module trace_table
  import contrail_pkg::*;
#(
  parameter int TT_ENTRIES = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic        lk_valid_i,
  input  pc_t         lk_pc_i,
  output logic        lk_valid_o,
  output logic        lk_hit_o,
  output logic        lk_predict_o,
  output trace_info_t lk_info_o,
  // install
  input  logic        wr_valid_i,
  input  pc_t         wr_pc_i,
  input  trace_info_t wr_info_i,
  // train
  input  logic        tr_valid_i,
  input  pc_t         tr_pc_i,
  input  logic        tr_correct_i
);
  localparam int IDXW = $clog2(TT_ENTRIES);
  localparam int TAGW = PCW - INSN_SHIFT - IDXW;

  typedef struct packed {
    logic            valid;
    logic [TAGW-1:0] tag;
    logic [1:0]      ctr;    // 2bC
    trace_info_t     info;
  } tt_entry_t;

  tt_entry_t tt [TT_ENTRIES];

  function automatic logic [IDXW-1:0] idx_of(pc_t pc);
    return pc[INSN_SHIFT +: IDXW];
  endfunction
  function automatic logic [TAGW-1:0] tag_of(pc_t pc);
    return pc[PCW-1 -: TAGW];
  endfunction

  // lookup
  tt_entry_t le;
  logic      l_hit;
  always_comb begin
    le    = tt[idx_of(lk_pc_i)];
    l_hit = le.valid && (le.tag == tag_of(lk_pc_i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_valid_o   <= 1'b0;
      lk_hit_o     <= 1'b0;
      lk_predict_o <= 1'b0;
      lk_info_o    <= '0;
    end else begin
      lk_valid_o   <= lk_valid_i;
      lk_hit_o     <= lk_valid_i && l_hit;
      lk_predict_o <= lk_valid_i && l_hit && le.ctr[1];
      lk_info_o    <= le.info;
    end
  end

  // train
  tt_entry_t te, tn;
  logic      t_hit;
  always_comb begin
    te    = tt[idx_of(tr_pc_i)];
    t_hit = te.valid && (te.tag == tag_of(tr_pc_i));
    tn    = te;
    if (tr_correct_i) tn.ctr = (te.ctr == 2'd3) ? 2'd3 : te.ctr + 2'd1;
    else              tn.ctr = (te.ctr == 2'd0) ? 2'd0 : te.ctr - 2'd1;
  end

  logic wr_same;
  assign wr_same = wr_valid_i && (idx_of(wr_pc_i) == idx_of(tr_pc_i));

  always_ff @(posedge clk) begin
    if (tr_valid_i && t_hit && !wr_same)
      tt[idx_of(tr_pc_i)] <= tn;
    if (wr_valid_i)
      tt[idx_of(wr_pc_i)] <= '{valid: 1'b1, tag: tag_of(wr_pc_i), ctr: 2'd1, info: wr_info_i};
  end

  initial begin
    for (int i = 0; i < TT_ENTRIES; i++) tt[i] = '0;
  end

endmodule
