// tb_decoupled_tlvp: self-checking test of the decoupled trace-level value
// predictor. Trains the value predictor on three instructions, installs a
// trace whose live-out registers they produce, and checks: values but no
// prediction while the 2-bit counter is low; after training, one
// predicted register per cycle in cycles 3..n+2 with the right identifier,
// producer address and value, and done with nextPC in cycle n+2; a missing
// trace gives no prediction.
module tb_decoupled_tlvp;
  import contrail_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        req_valid_i = 0, upd_valid_i = 0, wr_valid_i = 0, tr_valid_i = 0, tr_correct_i = 0;
  pc_t         req_pc_i = '0, upd_pc_i = '0, wr_pc_i = '0, tr_pc_i = '0;
  word_t       upd_value_i = '0;
  trace_info_t wr_info_i = '0;
  logic        req_ready_o, val_valid_o, val_conf_o, done_valid_o, done_predicted_o;
  reg_pred_t   val_o;
  pc_t         done_next_pc_o;
  logic [NREGW-1:0] done_nregs_o;
  int          checks = 0, failures = 0;

  decoupled_tlvp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam pc_t TSTART = 32'h0040_2000;
  localparam pc_t TNEXT  = 32'h0040_2080;
  pc_t   ppc [3] = '{32'h0040_2010, 32'h0040_2028, 32'h0040_2060};
  rid_t  prid[3] = '{5'd3, 5'd17, 5'd8};
  word_t pval[3] = '{32'd111, 32'd222, 32'hdead_0003};

  // Issue a request and record, per cycle after acceptance, what came out.
  int    n_vals, done_cycle, val_cycle [8];
  reg_pred_t vals [8];
  logic  vconf [8];
  logic  dpred;
  pc_t   dnext;
  task automatic request(pc_t pc);
    n_vals = 0; done_cycle = -1;
    @(negedge clk);
    req_valid_i = 1; req_pc_i = pc;
    check("ready when idle", req_ready_o);
    @(posedge clk); #1;
    req_valid_i = 0;
    for (int c = 1; c < 12 && done_cycle < 0; c++) begin
      if (val_valid_o) begin
        vals[n_vals] = val_o; vconf[n_vals] = val_conf_o; val_cycle[n_vals] = c; n_vals++;
      end
      if (done_valid_o) begin
        done_cycle = c; dpred = done_predicted_o; dnext = done_next_pc_o;
      end
      if (done_cycle < 0) begin @(posedge clk); #1; end
    end
    @(posedge clk); #1;
    check("ready again after done", req_ready_o);
  endtask

  initial begin
    trace_info_t ti;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // train the value predictor
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        upd_valid_i = 1; upd_pc_i = ppc[k]; upd_value_i = pval[k];
      end
    @(negedge clk); upd_valid_i = 0;

    // install the trace
    ti = '0; ti.next_pc = TNEXT; ti.nregs = 3;
    for (int k = 0; k < 3; k++) begin ti.rids[k] = prid[k]; ti.pcs[k] = ppc[k]; end
    @(negedge clk); wr_valid_i = 1; wr_pc_i = TSTART; wr_info_i = ti;
    @(negedge clk); wr_valid_i = 0;

    // counter at 1: values still produced, but the prediction is not used
    request(TSTART);
    check("weak trace: done in cycle n+2 = 5", done_cycle == 5);
    check("weak trace: not predicted, three values", !dpred && n_vals == 3);

    // one correct outcome: counter 2
    @(negedge clk); tr_valid_i = 1; tr_pc_i = TSTART; tr_correct_i = 1;
    @(negedge clk); tr_valid_i = 0;

    request(TSTART);
    check("predicted trace: done in cycle n+2 = 5", done_cycle == 5);
    check("predicted trace: predicted, nextPC", dpred && dnext == TNEXT);
    check("three values", n_vals == 3);
    for (int k = 0; k < 3; k++) begin
      check($sformatf("value %0d in cycle %0d", k, 3 + k), val_cycle[k] == 3 + k);
      check($sformatf("value %0d register", k), vals[k].rid == prid[k]);
      check($sformatf("value %0d producer", k), vals[k].pc == ppc[k]);
      check($sformatf("value %0d value", k), vals[k].value == pval[k]);
      check($sformatf("value %0d confident", k), vconf[k]);
    end

    // unknown trace
    request(32'h0040_9000);
    check("missing trace: done in cycle 1, not predicted", done_cycle == 1 && !dpred && n_vals == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
