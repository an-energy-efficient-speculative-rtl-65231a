// tb_verify_unit: self-checking test of the verification unit.
// Loads three predictions, arms, and retires instructions: unrelated ones are
// ignored, matching ones are confirmed, and the end of the trace after the
// last confirmation gives done and a "correct" training pulse one cycle
// later. The end of the trace with a register not produced is a
// misprediction, and a retirement in the arming cycle is checked. A wrong value (and a wrong
// register) gives mispredict and an "incorrect" training pulse one cycle
// later and disarms the unit. A squash abandons a verification silently.
module tb_verify_unit;
  import contrail_pkg::*;

  logic      clk = 0, rst_n = 0;
  logic      end_i = 0, shadow_i = 0, clear_i = 0, load_valid_i = 0, arm_i = 0, squash_i = 0, ret_valid_i = 0;
  reg_pred_t load_i = '0;
  pc_t       arm_pc_i = '0, ret_pc_i = '0;
  rid_t      ret_rid_i = '0;
  word_t     ret_value_i = '0;
  logic      active_o, mispredict_o, done_o, train_valid_o, train_correct_o;
  pc_t       train_pc_o;
  logic [NREGW-1:0] nloaded_o;
  reg_pred_t [MAX_REGS-1:0] slots_o;
  logic [31:0] n_correct_o, n_incorrect_o;
  int        checks = 0, failures = 0;

  verify_unit dut (.*);

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

  reg_pred_t p [3];

  task automatic load_and_arm(pc_t tpc);
    @(negedge clk); clear_i = 1;
    @(negedge clk); clear_i = 0;
    for (int k = 0; k < 3; k++) begin
      load_valid_i = 1; load_i = p[k];
      @(negedge clk);
    end
    load_valid_i = 0;
    check("three loaded", nloaded_o == 3);
    arm_i = 1; arm_pc_i = tpc;
    @(negedge clk); arm_i = 0;
    check("armed", active_o);
  endtask

  // retire one instruction; report what the unit signals in the next cycle
  task automatic retire(pc_t pc, rid_t r, word_t v, output logic mis, output logic dn,
                        output logic tv, output logic tc, input logic last = 0);
    ret_valid_i = 1; ret_pc_i = pc; ret_rid_i = r; ret_value_i = v; end_i = last;
    @(posedge clk); #1;
    ret_valid_i = 0; end_i = 0;
    mis = mispredict_o; dn = done_o; tv = train_valid_o; tc = train_correct_o;
    @(negedge clk);
  endtask

  logic mis, dn, tv, tc;

  initial begin
    p[0] = '{rid: 5'd4, pc: 32'h100, value: 32'd40};
    p[1] = '{rid: 5'd5, pc: 32'h118, value: 32'd50};
    p[2] = '{rid: 5'd6, pc: 32'h130, value: 32'd60};
    repeat (3) @(posedge clk);
    rst_n = 1;

    // all correct, retired out of slot order, with an unrelated instruction
    load_and_arm(32'h0f8);
    retire(32'h108, 5'd1, 32'd99, mis, dn, tv, tc);
    check("unrelated retire ignored", !mis && !dn && !tv);
    retire(32'h118, 5'd5, 32'd50, mis, dn, tv, tc);
    check("slot 1 confirmed, not yet done", !mis && !dn && active_o);
    retire(32'h100, 5'd4, 32'd40, mis, dn, tv, tc);
    check("slot 0 confirmed, not yet done", !mis && !dn);
    retire(32'h130, 5'd6, 32'd60, mis, dn, tv, tc);
    check("last confirmed, trace not ended: not done", !mis && !dn && active_o);
    retire(32'h138, 5'd1, 32'd0, mis, dn, tv, tc, 1'b1);
    check("end of trace: done", !mis && dn);
    check("train correct for the trace", tv && tc && train_pc_o == 32'h0f8);
    check("inactive after done", !active_o);
    check("three correct counted", n_correct_o == 3 && n_incorrect_o == 0);

    // wrong value in slot 1
    load_and_arm(32'h0f8);
    retire(32'h100, 5'd4, 32'd40, mis, dn, tv, tc);
    retire(32'h118, 5'd5, 32'd51, mis, dn, tv, tc);
    check("wrong value: mispredict", mis && !dn);
    check("train incorrect", tv && !tc);
    check("disarmed", !active_o);
    retire(32'h130, 5'd6, 32'd60, mis, dn, tv, tc);
    check("after mispredict: nothing more", !mis && !dn && !tv);
    check("counts", n_correct_o == 4 && n_incorrect_o == 1);

    // wrong register
    load_and_arm(32'h0f8);
    retire(32'h130, 5'd7, 32'd60, mis, dn, tv, tc);
    check("wrong register: mispredict", mis);

    // shadow check: trains the counter, reports nothing to the controller
    shadow_i = 1;
    load_and_arm(32'h0f8);
    retire(32'h100, 5'd4, 32'd41, mis, dn, tv, tc);
    check("shadow, wrong value: no mispredict, train incorrect", !mis && tv && !tc);
    load_and_arm(32'h0f8);
    retire(32'h100, 5'd4, 32'd40, mis, dn, tv, tc);
    retire(32'h118, 5'd5, 32'd50, mis, dn, tv, tc);
    retire(32'h130, 5'd6, 32'd60, mis, dn, tv, tc, 1'b1);
    check("shadow, all right: no done, train correct", !dn && tv && tc);
    shadow_i = 0;

    // trace ends without producing register 6
    load_and_arm(32'h0f8);
    retire(32'h100, 5'd4, 32'd40, mis, dn, tv, tc);
    retire(32'h118, 5'd5, 32'd50, mis, dn, tv, tc);
    retire(32'h138, 5'd1, 32'd0, mis, dn, tv, tc, 1'b1);
    check("end with a register missing: mispredict", mis && !dn && tv && !tc);

    // retirement in the arming cycle
    @(negedge clk); clear_i = 1;
    @(negedge clk); clear_i = 0;
    for (int k = 0; k < 3; k++) begin load_valid_i = 1; load_i = p[k]; @(negedge clk); end
    load_valid_i = 0;
    arm_i = 1; arm_pc_i = 32'h0f8;
    retire(32'h100, 5'd4, 32'd41, mis, dn, tv, tc);
    arm_i = 0;
    check("wrong value in the arming cycle: mispredict", mis);

    // squash
    load_and_arm(32'h0f8);
    squash_i = 1; @(negedge clk); squash_i = 0;
    check("squashed: inactive", !active_o);
    retire(32'h100, 5'd4, 32'd40, mis, dn, tv, tc);
    check("squashed: retire ignored", !mis && !dn && !tv);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
