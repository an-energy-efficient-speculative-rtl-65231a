// tb_trace_table: self-checking test of the trace table.
// Installs traces, checks lookups (hit, fields, one-cycle latency), walks the
// 2-bit counter up and down through the predict threshold, and checks that a
// trace sharing the index but not the tag misses and that training a missing
// trace changes nothing.
module tb_trace_table;
  import contrail_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        lk_valid_i = 0, wr_valid_i = 0, tr_valid_i = 0, tr_correct_i = 0;
  pc_t         lk_pc_i = '0, wr_pc_i = '0, tr_pc_i = '0;
  trace_info_t wr_info_i = '0;
  logic        lk_valid_o, lk_hit_o, lk_predict_o;
  trace_info_t lk_info_o;
  int          checks = 0, failures = 0;

  trace_table dut (.*);

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

  task automatic install(pc_t pc, trace_info_t info);
    @(negedge clk);
    wr_valid_i = 1; wr_pc_i = pc; wr_info_i = info;
    @(negedge clk);
    wr_valid_i = 0;
  endtask

  task automatic train(pc_t pc, logic ok);
    @(negedge clk);
    tr_valid_i = 1; tr_pc_i = pc; tr_correct_i = ok;
    @(negedge clk);
    tr_valid_i = 0;
  endtask

  task automatic lookup(pc_t pc, output logic hit, output logic pred, output trace_info_t info);
    @(negedge clk);
    lk_valid_i = 1; lk_pc_i = pc;
    @(posedge clk); #1;
    lk_valid_i = 0;
    check("lookup answers one cycle later", lk_valid_o === 1'b1);
    hit = lk_hit_o; pred = lk_predict_o; info = lk_info_o;
  endtask

  localparam pc_t T1 = 32'h0040_1000;
  localparam pc_t T2 = T1 + 32'(1024 * 8);  // same index, other tag
  trace_info_t i1, i2, got;
  logic hit, pred;

  initial begin
    i1.next_pc = 32'h0040_1040; i1.nregs = 3;
    i1.rids = {5'd0, 5'd9, 5'd4, 5'd2};
    i1.pcs  = {32'd0, 32'h0040_1030, 32'h0040_1018, 32'h0040_1008};
    i2 = i1; i2.next_pc = 32'h0050_0000; i2.nregs = 1;

    repeat (3) @(posedge clk);
    rst_n = 1;

    lookup(T1, hit, pred, got);
    check("cold miss", !hit && !pred);

    install(T1, i1);
    lookup(T1, hit, pred, got);
    check("installed: hit, counter 1 does not predict", hit && !pred);
    check("installed: fields", got == i1);

    train(T1, 1);                       // 2
    lookup(T1, hit, pred, got);
    check("counter 2 predicts", hit && pred);
    train(T1, 1); train(T1, 1);         // 3, saturates
    train(T1, 0);                       // 2
    lookup(T1, hit, pred, got);
    check("saturated then one miss: still predicts", pred);
    train(T1, 0);                       // 1
    lookup(T1, hit, pred, got);
    check("counter 1: no prediction", hit && !pred);
    train(T1, 0); train(T1, 0);         // 0, saturates
    train(T1, 1);                       // 1
    lookup(T1, hit, pred, got);
    check("floor then one hit: still no prediction", hit && !pred);
    train(T1, 1);                       // 2
    lookup(T1, hit, pred, got);
    check("back to 2: predicts", pred);

    lookup(T2, hit, pred, got);
    check("alias misses", !hit && !pred);
    train(T2, 0); train(T2, 0);         // missing trace: no effect on T1
    lookup(T1, hit, pred, got);
    check("training a missing trace leaves the entry", hit && pred);

    install(T2, i2);
    lookup(T2, hit, pred, got);
    check("alias installed", hit && !pred && got == i2);
    lookup(T1, hit, pred, got);
    check("T1 replaced", !hit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
