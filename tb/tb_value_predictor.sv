// tb_value_predictor: self-checking test of the hybrid value predictor.
// Trains a constant, a stride sequence and a repeating three-value pattern on
// different instructions and checks hit, confidence and predicted value
// against values computed from the sequences; checks the one-cycle predict
// latency and that an instruction sharing the index but not the tag misses.
module tb_value_predictor;
  import contrail_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  pred_valid_i = 0, upd_valid_i = 0;
  pc_t   pred_pc_i = '0, upd_pc_i = '0;
  word_t upd_value_i = '0;
  logic  pred_valid_o, pred_hit_o, pred_conf_o;
  word_t pred_value_o;
  int    checks = 0, failures = 0;

  value_predictor dut (.*);

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

  task automatic update(pc_t pc, word_t v);
    @(negedge clk);
    upd_valid_i = 1; upd_pc_i = pc; upd_value_i = v;
    @(negedge clk);
    upd_valid_i = 0;
  endtask

  // predict and return the registered answer, checking the latency
  task automatic predict(pc_t pc, output logic hit, output logic conf, output word_t v);
    @(negedge clk);
    pred_valid_i = 1; pred_pc_i = pc;
    @(posedge clk); #1;
    pred_valid_i = 0;
    check("predict answer one cycle after request", pred_valid_o === 1'b1);
    hit = pred_hit_o; conf = pred_conf_o; v = pred_value_o;
    @(posedge clk); #1;
    check("predict valid lasts one cycle", pred_valid_o === 1'b0);
  endtask

  localparam pc_t PC_A = 32'h0040_0100;
  localparam pc_t PC_B = 32'h0040_0208;
  localparam pc_t PC_C = 32'h0040_0310;
  localparam pc_t PC_D = PC_A + 32'(4096 * 8);   // same index as A, other tag

  logic hit, conf; word_t v;
  word_t pat [3] = '{32'd5, 32'd17, 32'd2};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // untrained instruction misses
    predict(PC_A, hit, conf, v);
    check("cold miss", hit == 0 && conf == 0);

    // constant value
    repeat (10) update(PC_A, 32'd42);
    predict(PC_A, hit, conf, v);
    check("constant: hit+conf", hit && conf);
    check("constant: value 42", v == 32'd42);

    // stride 3 from 100: after 100..112 the next is 115
    for (int i = 0; i < 5; i++) update(PC_B, 32'd100 + 32'(3 * i));
    predict(PC_B, hit, conf, v);
    check("stride: hit+conf", hit && conf);
    check("stride: value 115", v == 32'd115);
    // a stride break removes the confidence
    update(PC_B, 32'd1000);
    predict(PC_B, hit, conf, v);
    check("stride broken: not confident", hit && !conf);

    // repeating pattern 5,17,2: the context part learns it
    for (int i = 0; i < 60; i++) update(PC_C, pat[i % 3]);
    for (int i = 60; i < 72; i++) begin
      predict(PC_C, hit, conf, v);
      check("pattern: confident", hit && conf);
      check($sformatf("pattern: value at step %0d", i), v == pat[i % 3]);
      update(PC_C, pat[i % 3]);
    end

    // A is still intact; D aliases A's entry with another tag
    predict(PC_D, hit, conf, v);
    check("alias: miss", !hit && !conf);
    update(PC_D, 32'd7);
    predict(PC_A, hit, conf, v);
    check("alias: A evicted", !hit);
    predict(PC_D, hit, conf, v);
    // the pattern table is shared: D's all-zero history selects the counters
    // that A trained, so D already predicts its most recent value
    check("alias: D allocated, predicts 7", hit && conf && v == 32'd7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
