// tb_alu_cluster: self-checking test of the fast/slow execution cluster.
// Directed groups check the steering (unpredictable -> fast units 0..2,
// predictable -> slow units 3..5), in-order acceptance when a class runs out
// of free units or the group has a gap, and the misprediction flag. A random
// phase keeps a scoreboard by tag: every accepted instruction must return
// once, from a unit of its class, after exactly 1 (fast) or 2 (slow) cycles,
// with the value of an independent model. Operation and activity counters
// are checked at the end.
module tb_alu_cluster;
  import contrail_pkg::*;
  localparam int W = 4, NU = 6;

  logic clk = 0, rst_n = 0;
  logic    [W-1:0]       in_valid_i = '0, in_predictable_i = '0;
  alu_op_e [W-1:0]       in_op_i;
  word_t   [W-1:0]       in_a_i, in_b_i, in_pred_value_i;
  logic    [W-1:0][7:0]  in_tag_i;
  logic    [2:0]         accept_o;
  logic    [NU-1:0]      res_valid_o, res_predicted_o, res_mispredict_o;
  word_t   [NU-1:0]      res_value_o;
  logic    [NU-1:0][7:0] res_tag_o;
  logic    [31:0]        fast_ops_o, slow_ops_o, fast_busy_o, slow_busy_o;
  int checks = 0, failures = 0;

  alu_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t model(alu_op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_XOR: return a ^ b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      default: return '0;
    endcase
  endfunction

  // scoreboard
  int    cyc = 0;
  logic  sb_live [256];
  word_t sb_val  [256];
  logic  sb_pred [256], sb_mis [256];
  int    sb_cyc  [256];
  int    returned = 0, n_fast = 0, n_slow = 0, n_mis = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // result monitor
  always @(posedge clk) begin
    #2;
    for (int u = 0; u < NU; u++) if (res_valid_o[u] && rst_n) begin
      int t;
      t = int'(res_tag_o[u]);
      check($sformatf("tag %0d was in flight", t), sb_live[t]);
      check($sformatf("tag %0d right class", t), (u >= 3) == sb_pred[t]);
      check($sformatf("tag %0d latency", t), cyc - sb_cyc[t] == (sb_pred[t] ? 2 : 1));
      check($sformatf("tag %0d value", t), res_value_o[u] == sb_val[t]);
      check($sformatf("tag %0d mispredict flag", t), res_mispredict_o[u] == sb_mis[t] && res_predicted_o[u] == sb_pred[t]);
      sb_live[t] = 0;
      returned++;
    end
  end

  int tagc = 0;
  // offer a group; record what was accepted; returns accept count
  task automatic offer(logic [W-1:0] v, logic [W-1:0] p, logic [W-1:0] wrong, output int acc);
    @(negedge clk);
    for (int i = 0; i < W; i++) begin
      in_valid_i[i] = v[i]; in_predictable_i[i] = p[i];
      in_op_i[i] = alu_op_e'($urandom_range(0, 4) == 4 ? 1 : $urandom_range(0, 4));
      in_a_i[i] = $urandom; in_b_i[i] = $urandom;
      in_tag_i[i] = 8'((tagc + i) % 256);
      in_pred_value_i[i] = model(in_op_i[i], in_a_i[i], in_b_i[i]) ^ (wrong[i] ? 32'h10 : 32'h0);
    end
    #1;
    acc = int'(accept_o);
    for (int i = 0; i < acc; i++) begin
      int t;
      t = int'(in_tag_i[i]);
      sb_live[t] = 1; sb_val[t] = model(in_op_i[i], in_a_i[i], in_b_i[i]);
      sb_pred[t] = p[i]; sb_mis[t] = p[i] && wrong[i]; sb_cyc[t] = cyc;
      if (p[i]) n_slow++; else n_fast++;
      if (p[i] && wrong[i]) n_mis++;
    end
    tagc = (tagc + acc) % 256;
    @(posedge clk); #1;
    in_valid_i = '0;
  endtask

  int acc;
  initial begin
    for (int t = 0; t < 256; t++) sb_live[t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    offer(4'b1111, 4'b1010, 4'b1000, acc);
    check("2 fast + 2 slow accepted", acc == 4);
    offer(4'b0011, 4'b0011, 4'b0000, acc);
    check("only one slow unit free: one accepted", acc == 1);
    repeat (2) @(posedge clk);
    offer(4'b1111, 4'b0000, 4'b0000, acc);
    check("four unpredictable: three fast units", acc == 3);
    offer(4'b1101, 4'b0000, 4'b0000, acc);
    check("gap ends the group", acc == 1);
    repeat (3) @(posedge clk);
    check("directed results all returned", returned == 9);

    // random phase
    for (int k = 0; k < 400; k++) begin
      offer(4'($urandom), 4'($urandom), 4'($urandom), acc);
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    repeat (4) @(posedge clk); #3;
    check("all accepted instructions returned", returned == n_fast + n_slow);
    check("fast op counter", fast_ops_o == 32'(n_fast));
    check("slow op counter", slow_ops_o == 32'(n_slow));
    check("fast activity: 1 unit-cycle per op", fast_busy_o == 32'(n_fast));
    check("slow activity: 2 unit-cycles per op", slow_busy_o == 32'(2 * n_slow));
    check("some mispredictions seen", n_mis > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
