// value_predictor: instruction-level hybrid value predictor (stride + context).
//
// Two tables. The value history table (VHT, VHT_ENTRIES entries, indexed by
// the instruction address) holds per static instruction: a tag, LRU info, a
// stride-confidence state, the stride (difference of the last two values),
// four data values, and a value-history pattern made of the 2-bit codes
// {00,01,10,11} of the last HIST_P outcomes. The pattern indexes the pattern
// history table (PHT, PHT_ENTRIES = 4**HIST_P entries), whose entries hold one
// saturating up/down counter per data value. The counter that is largest
// selects the predicted value; on an update the counter of the correct outcome
// is incremented and the other three are decremented. Table sizes and four
// values per entry follow the design; counter width, threshold, stride state
// and the replacement rule are this implementation's choices: the context part
// predicts when its best counter reaches CNT_THRESH, otherwise the stride part
// (last value + stride) predicts when its 2-bit state is 2 or more. A value
// not among the four replaces the least recently seen one.
//
// Interface and timing:
//   predict: pred_valid_i/pred_pc_i in cycle t; pred_valid_o, pred_hit_o,
//            pred_conf_o, pred_value_o registered at the end of cycle t.
//   update : upd_valid_i/upd_pc_i/upd_value_i; tables written at the end of
//            the same cycle (one update per cycle). A miss allocates the entry.
// Both ports may be used in the same cycle; a predict reads the tables as
// they were before that cycle's update.
module value_predictor
  import contrail_pkg::*;
#(
  parameter int VHT_ENTRIES = 4096,
  parameter int HIST_P      = 6,             // 4**6 = 4096 PHT entries
  parameter int CNT_BITS    = 3,
  parameter int CNT_THRESH  = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  // predict port
  input  logic  pred_valid_i,
  input  pc_t   pred_pc_i,
  output logic  pred_valid_o,
  output logic  pred_hit_o,
  output logic  pred_conf_o,
  output word_t pred_value_o,
  // update port
  input  logic  upd_valid_i,
  input  pc_t   upd_pc_i,
  input  word_t upd_value_i
);
  localparam int NVAL    = 4;
  localparam int IDXW    = $clog2(VHT_ENTRIES);
  localparam int TAGW    = PCW - INSN_SHIFT - IDXW;
  localparam int HISTW   = 2 * HIST_P;
  localparam int PHT_ENTRIES = 1 << HISTW;
  localparam logic [CNT_BITS-1:0] CNT_MAX = '1;

  typedef logic [1:0] code_t;
  typedef logic [CNT_BITS-1:0] cnt_t;

  typedef struct packed {
    logic                    valid;
    logic [TAGW-1:0]         tag;
    code_t [NVAL-1:0]        age;     // LRU info: 0 = most recently seen
    logic [1:0]              state;   // stride confidence
    word_t                   stride;
    word_t [NVAL-1:0]        vals;
    logic [HISTW-1:0]        hist;
  } vht_t;

  typedef cnt_t [NVAL-1:0] pht_t;

  vht_t vht [VHT_ENTRIES];
  pht_t pht [PHT_ENTRIES];

  function automatic logic [IDXW-1:0] idx_of(pc_t pc);
    return pc[INSN_SHIFT +: IDXW];
  endfunction
  function automatic logic [TAGW-1:0] tag_of(pc_t pc);
    return pc[PCW-1 -: TAGW];
  endfunction
  // Slot of the most recently seen value.
  function automatic code_t mru_of(vht_t e);
    code_t m = 2'd0;
    for (int i = NVAL - 1; i >= 0; i--) if (e.age[i] == 2'd0) m = code_t'(i);
    return m;
  endfunction
  // Slot whose counter is largest (lowest slot on a tie).
  function automatic code_t best_of(pht_t c);
    code_t b = 2'd0;
    for (int i = 1; i < NVAL; i++) if (c[i] > c[b]) b = code_t'(i);
    return b;
  endfunction

  // ---------------- predict ----------------
  vht_t  pe;
  pht_t  pc_cnt;
  code_t pbest, pmru;
  logic  p_hit, p_conf;
  word_t p_value;

  always_comb begin
    pe      = vht[idx_of(pred_pc_i)];
    pc_cnt  = pht[pe.hist];
    pbest   = best_of(pc_cnt);
    pmru    = mru_of(pe);
    p_hit   = pe.valid && (pe.tag == tag_of(pred_pc_i));
    p_conf  = 1'b0;
    p_value = pe.vals[pbest];
    if (pc_cnt[pbest] >= cnt_t'(CNT_THRESH)) begin
      p_conf  = p_hit;
    end else if (pe.state >= 2'd2) begin
      p_conf  = p_hit;
      p_value = pe.vals[pmru] + pe.stride;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pred_valid_o <= 1'b0;
      pred_hit_o   <= 1'b0;
      pred_conf_o  <= 1'b0;
      pred_value_o <= '0;
    end else begin
      pred_valid_o <= pred_valid_i;
      pred_hit_o   <= pred_valid_i && p_hit;
      pred_conf_o  <= pred_valid_i && p_conf;
      pred_value_o <= p_value;
    end
  end

  // ---------------- update ----------------
  vht_t  ue, un;
  pht_t  uc, ucn;
  logic  u_hit, u_match;
  code_t u_slot, u_mru;
  word_t u_stride;

  always_comb begin
    ue      = vht[idx_of(upd_pc_i)];
    uc      = pht[ue.hist];
    u_hit   = ue.valid && (ue.tag == tag_of(upd_pc_i));
    u_mru   = mru_of(ue);
    u_match = 1'b0;
    u_slot  = 2'd0;
    for (int i = NVAL - 1; i >= 0; i--)
      if (ue.vals[i] == upd_value_i) begin u_match = 1'b1; u_slot = code_t'(i); end
    if (!u_match)
      for (int i = NVAL - 1; i >= 0; i--)
        if (ue.age[i] == 2'd3) u_slot = code_t'(i);   // least recently seen
    u_stride = upd_value_i - ue.vals[u_mru];

    un  = ue;
    ucn = uc;
    if (!u_hit) begin
      // allocate: the value becomes the most recent of four
      un.valid  = 1'b1;
      un.tag    = tag_of(upd_pc_i);
      un.state  = 2'd0;
      un.stride = '0;
      un.hist   = '0;
      for (int i = 0; i < NVAL; i++) begin
        un.age[i]  = code_t'(i);
        un.vals[i] = (i == 0) ? upd_value_i : '0;
      end
    end else begin
      // stride part
      if (u_stride == ue.stride) un.state = (ue.state == 2'd3) ? 2'd3 : ue.state + 2'd1;
      else                       un.state = 2'd0;
      un.stride = u_stride;
      // value storage and LRU info
      un.vals[u_slot] = upd_value_i;
      for (int i = 0; i < NVAL; i++)
        if (code_t'(i) == u_slot)           un.age[i] = 2'd0;
        else if (ue.age[i] < ue.age[u_slot]) un.age[i] = ue.age[i] + 2'd1;
      // context part: train the counters, shift the outcome into the history
      for (int i = 0; i < NVAL; i++)
        if (code_t'(i) == u_slot) ucn[i] = (uc[i] == CNT_MAX) ? uc[i] : uc[i] + cnt_t'(1);
        else                      ucn[i] = (uc[i] == '0)      ? uc[i] : uc[i] - cnt_t'(1);
      un.hist = {ue.hist[HISTW-3:0], u_slot};
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid_i) begin
      vht[idx_of(upd_pc_i)] <= un;
      if (u_hit) pht[ue.hist] <= ucn;
    end
  end

  // Tables are cleared at start-up (valid bits and counters at zero).
  initial begin
    for (int i = 0; i < VHT_ENTRIES; i++) vht[i] = '0;
    for (int i = 0; i < PHT_ENTRIES; i++) pht[i] = '0;
  end

endmodule
