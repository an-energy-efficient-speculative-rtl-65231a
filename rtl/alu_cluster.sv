// alu_cluster: integer execution cluster with fast and slow ALUs, steered by
// value predictability.
//
// Instructions whose result was value-predicted are off the critical path:
// their consumers already run with the predicted value, so the instruction
// itself only verifies the prediction and may execute slowly. The cluster
// therefore sends predictable instructions to slow, power-efficient ALUs
// (two cycles, half frequency, low voltage) and unpredictable ones to fast,
// power-hungry ALUs (one cycle). The result of a predicted instruction is
// compared with its prediction and a mismatch is flagged, which is where a
// misprediction is detected. The unit counts (3 fast + 3 slow) and the steering
// rule follow the design. The issue width, in-order acceptance of the issue
// group, the fallback when the preferred class is busy (none: the
// instruction waits), and the activity counters are this implementation's.
//
// Interface and timing: up to ISSUE_W instructions are offered per cycle
// (in_valid_i, lowest index oldest). accept_o tells how many of them, from
// index 0 upward, were taken this cycle; an instruction is taken when a unit
// of its class is free, and the first one that finds none stops the rest.
// Each unit shows its result on res_* LATENCY cycles later (1 fast, 2 slow);
// units 0..N_FAST-1 are fast, N_FAST..N_FAST+N_SLOW-1 slow.
// fast_busy_o/slow_busy_o count unit-cycles with an operation in flight, the
// activity from which ALU energy is estimated.
module alu_cluster
  import contrail_pkg::*;
#(
  parameter int N_FAST  = 3,
  parameter int N_SLOW  = 3,
  parameter int ISSUE_W = 4,
  parameter int TAGW    = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic    [ISSUE_W-1:0]         in_valid_i,
  input  alu_op_e [ISSUE_W-1:0]         in_op_i,
  input  word_t   [ISSUE_W-1:0]         in_a_i,
  input  word_t   [ISSUE_W-1:0]         in_b_i,
  input  logic    [ISSUE_W-1:0]         in_predictable_i,
  input  word_t   [ISSUE_W-1:0]         in_pred_value_i,
  input  logic    [ISSUE_W-1:0][TAGW-1:0] in_tag_i,
  output logic    [$clog2(ISSUE_W+1)-1:0] accept_o,
  output logic    [N_FAST+N_SLOW-1:0]   res_valid_o,
  output word_t   [N_FAST+N_SLOW-1:0]   res_value_o,
  output logic    [N_FAST+N_SLOW-1:0][TAGW-1:0] res_tag_o,
  output logic    [N_FAST+N_SLOW-1:0]   res_predicted_o,
  output logic    [N_FAST+N_SLOW-1:0]   res_mispredict_o,
  output logic    [31:0]                fast_ops_o,
  output logic    [31:0]                slow_ops_o,
  output logic    [31:0]                fast_busy_o,
  output logic    [31:0]                slow_busy_o
);
  localparam int NU    = N_FAST + N_SLOW;
  localparam int METAW = TAGW + 1 + XLEN;   // tag, predicted flag, predicted value
  localparam int AW    = $clog2(ISSUE_W + 1);
  localparam int UW    = (NU > 1) ? $clog2(NU) : 1;
  localparam int SW    = (ISSUE_W > 1) ? $clog2(ISSUE_W) : 1;

  logic [NU-1:0]            u_ready, u_valid, u_out_valid, u_busy;
  alu_op_e [NU-1:0]         u_op;
  word_t [NU-1:0]           u_a, u_b, u_out_value;
  logic [NU-1:0][METAW-1:0] u_meta, u_out_meta;

  // Steering: walk the issue group in order, give each instruction the first
  // free unit of its class.
  logic [NU-1:0]         taken;
  logic [NU-1:0][SW-1:0] src;
  logic                  blocked;
  logic [AW-1:0]         n_acc;
  logic [AW-1:0]         n_fast, n_slow;
  logic                  found;
  always_comb begin
    found   = 1'b0;
    taken   = '0;
    src     = '0;
    blocked = 1'b0;
    n_acc   = '0;
    n_fast  = '0;
    n_slow  = '0;
    for (int i = 0; i < ISSUE_W; i++) begin
      if (in_valid_i[i] && !blocked) begin
        found = 1'b0;
        for (int u = 0; u < NU; u++) begin
          if (!found && u_ready[u] && !taken[u] &&
              ((u >= N_FAST) == in_predictable_i[i])) begin
            found    = 1'b1;
            taken[u] = 1'b1;
            src[u]   = SW'(i);
          end
        end
        if (found) begin
          n_acc = n_acc + 1'b1;
          if (in_predictable_i[i]) n_slow = n_slow + 1'b1;
          else                     n_fast = n_fast + 1'b1;
        end else begin
          blocked = 1'b1;
        end
      end else begin
        blocked = 1'b1;   // in order: a gap ends the group
      end
    end
  end
  assign accept_o = n_acc;

  for (genvar u = 0; u < NU; u++) begin : g_unit
    assign u_valid[u] = taken[u];
    assign u_op[u]    = in_op_i[src[u]];
    assign u_a[u]     = in_a_i[src[u]];
    assign u_b[u]     = in_b_i[src[u]];
    assign u_meta[u]  = {in_tag_i[src[u]], in_predictable_i[src[u]], in_pred_value_i[src[u]]};

    int_alu #(.LATENCY(u < N_FAST ? 1 : 2), .METAW(METAW)) u_alu (
      .clk, .rst_n,
      .in_valid_i  (u_valid[u]),
      .in_ready_o  (u_ready[u]),
      .op_i        (u_op[u]),
      .a_i         (u_a[u]),
      .b_i         (u_b[u]),
      .meta_i      (u_meta[u]),
      .out_valid_o (u_out_valid[u]),
      .out_value_o (u_out_value[u]),
      .out_meta_o  (u_out_meta[u]),
      .busy_o      (u_busy[u])
    );

    assign res_valid_o[u]      = u_out_valid[u];
    assign res_value_o[u]      = u_out_value[u];
    assign res_tag_o[u]        = u_out_meta[u][METAW-1 -: TAGW];
    assign res_predicted_o[u]  = u_out_meta[u][XLEN];
    assign res_mispredict_o[u] = u_out_valid[u] && u_out_meta[u][XLEN] &&
                                 (u_out_meta[u][XLEN-1:0] != u_out_value[u]);
  end

  // activity counters
  logic [UW:0] busy_f, busy_s;
  always_comb begin
    busy_f = '0;
    busy_s = '0;
    for (int u = 0; u < NU; u++)
      if (u_busy[u]) begin
        if (u < N_FAST) busy_f = busy_f + 1'b1;
        else            busy_s = busy_s + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fast_ops_o  <= '0;
      slow_ops_o  <= '0;
      fast_busy_o <= '0;
      slow_busy_o <= '0;
    end else begin
      fast_ops_o  <= fast_ops_o + 32'(n_fast);
      slow_ops_o  <= slow_ops_o + 32'(n_slow);
      fast_busy_o <= fast_busy_o + 32'(busy_f);
      slow_busy_o <= slow_busy_o + 32'(busy_s);
    end
  end

endmodule
