// tb_int_alu: self-checking test of the integer ALU at both latencies.
// A fast (1-cycle) and a slow (2-cycle) instance receive random operations;
// results are compared with an independent model and must appear exactly
// LATENCY cycles after acceptance. The fast unit must accept every cycle, the
// slow one every second cycle.
module tb_int_alu;
  import contrail_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  f_in_valid = 0, s_in_valid = 0;
  alu_op_e f_op = OP_ADD, s_op = OP_ADD;
  word_t f_a = '0, f_b = '0, s_a = '0, s_b = '0;
  logic [7:0] f_meta = '0, s_meta = '0;
  logic  f_ready, s_ready, f_out_valid, s_out_valid, f_busy, s_busy;
  word_t f_out, s_out;
  logic [7:0] f_out_meta, s_out_meta;
  int    checks = 0, failures = 0;

  int_alu #(.LATENCY(1)) u_fast (
    .clk, .rst_n, .in_valid_i(f_in_valid), .in_ready_o(f_ready), .op_i(f_op), .a_i(f_a), .b_i(f_b),
    .meta_i(f_meta), .out_valid_o(f_out_valid), .out_value_o(f_out), .out_meta_o(f_out_meta), .busy_o(f_busy));
  int_alu #(.LATENCY(2)) u_slow (
    .clk, .rst_n, .in_valid_i(s_in_valid), .in_ready_o(s_ready), .op_i(s_op), .a_i(s_a), .b_i(s_b),
    .meta_i(s_meta), .out_valid_o(s_out_valid), .out_value_o(s_out), .out_meta_o(s_out_meta), .busy_o(s_busy));

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

  // independent model
  function automatic word_t model(alu_op_e op, word_t a, word_t b);
    longint sa, sb;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    case (op)
      OP_ADD:  return word_t'(longint'(a) + longint'(b));
      OP_SUB:  return word_t'(longint'(a) - longint'(b));
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_NOR:  return ~a & ~b;
      OP_SLT:  return (sa < sb) ? 32'd1 : 32'd0;
      OP_SLTU: return (longint'(a) < longint'(b)) ? 32'd1 : 32'd0;
      OP_SLL:  return word_t'(longint'(a) * (longint'(1) << b[4:0]));
      OP_SRL:  return word_t'(longint'(a) / (longint'(1) << b[4:0]));
      OP_SRA:  return word_t'(sa >>> b[4:0]);
      OP_LUI:  return word_t'(longint'(b[15:0]) * 65536);
      default: return '0;
    endcase
  endfunction

  // fast unit: one operation per cycle, result next cycle
  initial begin
    word_t exp_v; logic [7:0] exp_m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      check("fast always ready", f_ready);
      f_in_valid = 1; f_op = alu_op_e'($urandom_range(0, 11));
      f_a = $urandom; f_b = (i % 4 == 0) ? 32'($urandom_range(0, 40)) : $urandom; f_meta = 8'(i);
      exp_v = model(f_op, f_a, f_b); exp_m = 8'(i);
      @(posedge clk); #1;
      check("fast result after 1 cycle", f_out_valid && f_out_meta == exp_m);
      check($sformatf("fast value op %0d", f_op), f_out == exp_v);
    end
    @(negedge clk); f_in_valid = 0;
  end

  // slow unit: offered every cycle, accepted every second cycle
  initial begin
    word_t exp_v; int acc_cycle, n_acc, cyc;
    repeat (3) @(posedge clk);
    @(negedge clk);
    n_acc = 0; cyc = 0;
    while (n_acc < 100) begin
      s_in_valid = 1; s_op = alu_op_e'($urandom_range(0, 11));
      s_a = $urandom; s_b = $urandom_range(0, 31); s_meta = 8'(n_acc);
      if (s_ready) begin
        exp_v = model(s_op, s_a, s_b);
        @(posedge clk); #1;
        s_in_valid = 0;
        check("slow: no result after 1 cycle", !s_out_valid);
        check("slow: not ready in its second cycle", !s_ready);
        @(posedge clk); #1;
        check("slow result after 2 cycles", s_out_valid && s_out_meta == 8'(n_acc));
        check("slow value", s_out == exp_v);
        check("slow: ready again", s_ready);
        n_acc++;
        @(negedge clk);
      end else begin
        check("slow ready when idle", 1'b0);
        @(negedge clk);
      end
    end
    s_in_valid = 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
