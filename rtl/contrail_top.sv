// contrail_top: the Contrail speculative chip-multiprocessor.
//
// Idea: a trace-level value predictor lets the program skip predictable
// regions (traces). The processing element (PE) that reaches a predictable
// trace hands the rest of the program, started from the predicted register
// values, to the next PE of a ring, and executes the skipped trace itself
// only to verify the prediction. The stream that runs ahead (speculation
// stream) is on the critical path and runs at 800 MHz / 1.3 V; the streams
// left behind (verification streams) are not, and run at 400 MHz / 1.0 V.
// A wrong prediction squashes all younger streams and the PE that found it
// continues as the speculation stream.
//
// Contents:
//   * N_PE contrail_pe instances connected in a ring by one-cycle links that
//     carry the spawn packet (start address and predicted registers);
//   * ring_thread_ctrl, which grants spawns, frees PEs and squashes streams;
//   * alu_cluster, standing beside the ring with its own ports: the
//     single-core form of the same idea, in which predicted instructions run
//     on slow, low-voltage ALUs and the others on fast ALUs.
// Each PE's datapath, trace cache and data cache are outside this design; the
// dp_* ports of every PE are brought out as arrays indexed by PE.
// Event counters report how often each mechanism happened: spawns, refused
// spawns (next PE busy), releases of verified PEs, mispredictions and
// squashed streams.
module contrail_top
  import contrail_pkg::*;
#(
  parameter int N_PE        = 4,
  parameter int TT_ENTRIES  = 1024,
  parameter int VHT_ENTRIES = 4096,
  parameter int HIST_P      = 6,
  parameter int N_FAST      = 3,
  parameter int N_SLOW      = 3,
  parameter int ISSUE_W     = 4,
  parameter int TAGW        = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // program control
  input  logic                           start_i,    // boot PE 0 as the speculation stream
  input  logic                           finish_i,   // speculation stream reached the program end
  output logic                           all_done_o,
  output pe_state_e   [N_PE-1:0]         pe_state_o,
  output logic [$clog2(N_PE)-1:0]        head_o,
  output logic        [N_PE-1:0]         squash_o,
  output logic        [N_PE-1:0]         recover_o,  // PE continues as speculation stream from its own state
  // per-PE datapath side
  input  logic        [N_PE-1:0]         dp_lookup_valid_i,
  input  pc_t         [N_PE-1:0]         dp_lookup_pc_i,
  output logic        [N_PE-1:0]         dp_lookup_ready_o,
  output logic        [N_PE-1:0]         dp_skip_o,
  output logic        [N_PE-1:0]         dp_noskip_o,
  output pc_t         [N_PE-1:0]         dp_stop_pc_o,
  input  logic        [N_PE-1:0]         dp_ret_valid_i,
  input  pc_t         [N_PE-1:0]         dp_ret_pc_i,
  input  rid_t        [N_PE-1:0]         dp_ret_rid_i,
  input  word_t       [N_PE-1:0]         dp_ret_value_i,
  input  logic        [N_PE-1:0]         dp_trace_end_i,
  input  logic        [N_PE-1:0]         dp_tt_wr_valid_i,
  input  pc_t         [N_PE-1:0]         dp_tt_wr_pc_i,
  input  trace_info_t [N_PE-1:0]         dp_tt_wr_info_i,
  output logic        [N_PE-1:0]         dp_start_o,
  output spawn_pkt_t  [N_PE-1:0]         dp_start_pkt_o,
  // per-PE voltage / clock
  output logic        [N_PE-1:0]         pe_clk_en_o,
  output logic        [N_PE-1:0][10:0]   pe_vdd_mv_o,
  output logic        [N_PE-1:0][9:0]    pe_freq_mhz_o,
  // event counters
  output logic [31:0]                    n_spawn_o,
  output logic [31:0]                    n_spawn_stall_o,
  output logic [31:0]                    n_release_o,
  output logic [31:0]                    n_mispredict_o,
  output logic [31:0]                    n_squashed_o,
  output logic [31:0]                    n_value_correct_o,
  output logic [31:0]                    n_value_incorrect_o,
  // execution cluster (single-core form)
  input  logic    [ISSUE_W-1:0]          ex_valid_i,
  input  alu_op_e [ISSUE_W-1:0]          ex_op_i,
  input  word_t   [ISSUE_W-1:0]          ex_a_i,
  input  word_t   [ISSUE_W-1:0]          ex_b_i,
  input  logic    [ISSUE_W-1:0]          ex_predictable_i,
  input  word_t   [ISSUE_W-1:0]          ex_pred_value_i,
  input  logic    [ISSUE_W-1:0][TAGW-1:0] ex_tag_i,
  output logic    [$clog2(ISSUE_W+1)-1:0] ex_accept_o,
  output logic    [N_FAST+N_SLOW-1:0]    ex_res_valid_o,
  output word_t   [N_FAST+N_SLOW-1:0]    ex_res_value_o,
  output logic    [N_FAST+N_SLOW-1:0][TAGW-1:0] ex_res_tag_o,
  output logic    [N_FAST+N_SLOW-1:0]    ex_res_predicted_o,
  output logic    [N_FAST+N_SLOW-1:0]    ex_res_mispredict_o,
  output logic    [31:0]                 ex_fast_ops_o,
  output logic    [31:0]                 ex_slow_ops_o,
  output logic    [31:0]                 ex_fast_busy_o,
  output logic    [31:0]                 ex_slow_busy_o
);
  pe_state_e   [N_PE-1:0] state;
  speed_mode_e [N_PE-1:0] mode;
  logic [N_PE-1:0] spawn_req, spawn_grant, spawn_new, squash, recover;
  logic [N_PE-1:0] mispredict, verify_done;
  logic            spawn_stall;
  logic [N_PE-1:0] ring_out_valid, link_valid;
  spawn_pkt_t [N_PE-1:0] ring_out, link_pkt;
  logic [N_PE-1:0][31:0] n_corr, n_inc;

  ring_thread_ctrl #(.N_PE(N_PE)) u_ctrl (
    .clk, .rst_n,
    .start_i,
    .spawn_req_i   (spawn_req),
    .verify_done_i (verify_done),
    .mispredict_i  (mispredict),
    .finish_i,
    .state_o       (state),
    .head_o,
    .spawn_grant_o (spawn_grant),
    .spawn_new_o   (spawn_new),
    .spawn_stall_o (spawn_stall),
    .squash_o      (squash),
    .recover_o     (recover),
    .mode_o        (mode),
    .finished_o    (),
    .all_done_o
  );

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    localparam int PREV = (p == 0) ? N_PE - 1 : p - 1;

    contrail_pe #(.TT_ENTRIES(TT_ENTRIES), .VHT_ENTRIES(VHT_ENTRIES), .HIST_P(HIST_P)) u_pe (
      .clk, .rst_n,
      .dp_lookup_valid_i (dp_lookup_valid_i[p]),
      .dp_lookup_pc_i    (dp_lookup_pc_i[p]),
      .dp_lookup_ready_o (dp_lookup_ready_o[p]),
      .dp_skip_o         (dp_skip_o[p]),
      .dp_noskip_o       (dp_noskip_o[p]),
      .dp_stop_pc_o      (dp_stop_pc_o[p]),
      .dp_ret_valid_i    (dp_ret_valid_i[p]),
      .dp_ret_pc_i       (dp_ret_pc_i[p]),
      .dp_ret_rid_i      (dp_ret_rid_i[p]),
      .dp_ret_value_i    (dp_ret_value_i[p]),
      .dp_trace_end_i    (dp_trace_end_i[p]),
      .dp_tt_wr_valid_i  (dp_tt_wr_valid_i[p]),
      .dp_tt_wr_pc_i     (dp_tt_wr_pc_i[p]),
      .dp_tt_wr_info_i   (dp_tt_wr_info_i[p]),
      .dp_start_o        (dp_start_o[p]),
      .dp_start_pkt_o    (dp_start_pkt_o[p]),
      .state_i           (state[p]),
      .mode_i            (mode[p]),
      .spawn_req_o       (spawn_req[p]),
      .spawn_grant_i     (spawn_grant[p]),
      .squash_i          (squash[p]),
      .mispredict_o      (mispredict[p]),
      .verify_done_o     (verify_done[p]),
      .ring_out_valid_o  (ring_out_valid[p]),
      .ring_out_o        (ring_out[p]),
      .ring_in_valid_i   (link_valid[p] && state[p] == PE_SPEC),
      .ring_in_i         (link_pkt[p]),
      .clk_en_o          (pe_clk_en_o[p]),
      .vdd_mv_o          (pe_vdd_mv_o[p]),
      .freq_mhz_o        (pe_freq_mhz_o[p]),
      .n_correct_o       (n_corr[p]),
      .n_incorrect_o     (n_inc[p])
    );

    // ring link from the previous PE: one register stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        link_valid[p] <= 1'b0;
        link_pkt[p]   <= '0;
      end else begin
        link_valid[p] <= ring_out_valid[PREV];
        link_pkt[p]   <= ring_out[PREV];
      end
    end
  end

  alu_cluster #(.N_FAST(N_FAST), .N_SLOW(N_SLOW), .ISSUE_W(ISSUE_W), .TAGW(TAGW)) u_cluster (
    .clk, .rst_n,
    .in_valid_i       (ex_valid_i),
    .in_op_i          (ex_op_i),
    .in_a_i           (ex_a_i),
    .in_b_i           (ex_b_i),
    .in_predictable_i (ex_predictable_i),
    .in_pred_value_i  (ex_pred_value_i),
    .in_tag_i         (ex_tag_i),
    .accept_o         (ex_accept_o),
    .res_valid_o      (ex_res_valid_o),
    .res_value_o      (ex_res_value_o),
    .res_tag_o        (ex_res_tag_o),
    .res_predicted_o  (ex_res_predicted_o),
    .res_mispredict_o (ex_res_mispredict_o),
    .fast_ops_o       (ex_fast_ops_o),
    .slow_ops_o       (ex_slow_ops_o),
    .fast_busy_o      (ex_fast_busy_o),
    .slow_busy_o      (ex_slow_busy_o)
  );

  // event counters
  logic [$clog2(N_PE+1)-1:0] rel_cnt, sq_cnt;
  always_comb begin
    rel_cnt = '0;
    sq_cnt  = '0;
    for (int p = 0; p < N_PE; p++) begin
      if (verify_done[p] && state[p] == PE_VERIFY && !squash[p]) rel_cnt = rel_cnt + 1'b1;
      if (squash[p]) sq_cnt = sq_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_spawn_o       <= '0;
      n_spawn_stall_o <= '0;
      n_release_o     <= '0;
      n_mispredict_o  <= '0;
      n_squashed_o    <= '0;
    end else begin
      if (|spawn_grant) n_spawn_o       <= n_spawn_o + 1;
      if (spawn_stall)  n_spawn_stall_o <= n_spawn_stall_o + 1;
      if (|recover)     n_mispredict_o  <= n_mispredict_o + 1;
      n_release_o  <= n_release_o + 32'(rel_cnt);
      n_squashed_o <= n_squashed_o + 32'(sq_cnt);
    end
  end

  always_comb begin
    n_value_correct_o   = '0;
    n_value_incorrect_o = '0;
    for (int p = 0; p < N_PE; p++) begin
      n_value_correct_o   = n_value_correct_o + n_corr[p];
      n_value_incorrect_o = n_value_incorrect_o + n_inc[p];
    end
  end

  assign pe_state_o = state;
  assign squash_o   = squash;
  assign recover_o  = recover;

  // spawn_new is implied by the grant; both move together
  assert property (@(posedge clk) disable iff (!rst_n) $countones(spawn_new) == $countones(spawn_grant));

endmodule
