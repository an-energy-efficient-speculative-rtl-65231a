// tb_contrail_pe: self-checking test of one processing element. The test
// bench plays the datapath and the ring controller. It trains the value
// predictor through the retire stream, installs a two-register trace and
// checks: a weak trace is executed normally and checked in the shadow, which
// raises its counter; the next lookup asks to spawn (cycle n+2), a grant sends
// the predicted registers over the ring and arms the verification, correct
// values release the PE; a wrong value raises mispredict; a refused spawn
// makes the datapath execute the trace; a packet from the previous PE starts
// the datapath; the Vdd/Clk controller follows the mode.
module tb_contrail_pe;
  import contrail_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        dp_trace_end_i = 0, dp_lookup_valid_i = 0, dp_ret_valid_i = 0, dp_tt_wr_valid_i = 0;
  pc_t         dp_lookup_pc_i = '0, dp_ret_pc_i = '0, dp_tt_wr_pc_i = '0;
  rid_t        dp_ret_rid_i = '0;
  word_t       dp_ret_value_i = '0;
  trace_info_t dp_tt_wr_info_i = '0;
  logic        dp_lookup_ready_o, dp_skip_o, dp_noskip_o, dp_start_o;
  pc_t         dp_stop_pc_o;
  spawn_pkt_t  dp_start_pkt_o, ring_out_o, ring_in_i = '0;
  pe_state_e   state_i = PE_SPEC;
  speed_mode_e mode_i = MODE_HIGH;
  logic        spawn_req_o, spawn_grant_i = 0, squash_i = 0, mispredict_o, verify_done_o;
  logic        ring_out_valid_o, ring_in_valid_i = 0, clk_en_o;
  logic [10:0] vdd_mv_o;
  logic [9:0]  freq_mhz_o;
  logic [31:0] n_correct_o, n_incorrect_o;
  int          checks = 0, failures = 0;

  contrail_pe dut (.*);

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

  localparam pc_t T = 32'h0040_4000, TN = 32'h0040_4040;
  localparam pc_t P0 = 32'h0040_4008, P1 = 32'h0040_4020;

  // the producer at P1 is the last instruction of the trace
  task automatic retire(pc_t pc, rid_t r, word_t v);
    @(negedge clk);
    dp_ret_valid_i = 1; dp_ret_pc_i = pc; dp_ret_rid_i = r; dp_ret_value_i = v;
    dp_trace_end_i = (pc == P1);
    @(negedge clk);
    dp_ret_valid_i = 0; dp_trace_end_i = 0;
  endtask

  // look up T; return the cycle of the outcome and which one it was
  int  oc; logic o_req, o_noskip;
  task automatic lookup(logic grant);
    @(negedge clk);
    check("lookup ready", dp_lookup_ready_o);
    dp_lookup_valid_i = 1; dp_lookup_pc_i = T;
    @(posedge clk); #1;
    dp_lookup_valid_i = 0;
    oc = -1;
    for (int c = 1; c < 10 && oc < 0; c++) begin
      spawn_grant_i = grant && spawn_req_o;
      #1;
      if (spawn_req_o || dp_noskip_o) begin
        oc = c; o_req = spawn_req_o; o_noskip = dp_noskip_o;
      end
      @(posedge clk); #1;
      spawn_grant_i = 0;
    end
  endtask

  initial begin
    trace_info_t ti;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (8) @(posedge clk); #1;
    check("high speed: 800 MHz, 1.3 V", freq_mhz_o == 10'd800 && vdd_mv_o == 11'd1300);

    for (int r = 0; r < 8; r++) begin retire(P0, 5'd3, 32'd111); retire(P1, 5'd7, 32'd222); end
    ti = '0; ti.next_pc = TN; ti.nregs = 2;
    ti.rids[0] = 5'd3; ti.pcs[0] = P0; ti.rids[1] = 5'd7; ti.pcs[1] = P1;
    @(negedge clk); dp_tt_wr_valid_i = 1; dp_tt_wr_pc_i = T; dp_tt_wr_info_i = ti;
    @(negedge clk); dp_tt_wr_valid_i = 0;

    // weak trace: executed normally, checked in the shadow
    lookup(1'b0);
    check("weak trace: noskip in cycle 5", oc == 5 && o_noskip && !o_req);
    @(negedge clk);
    check("lookup blocked during the shadow check", !dp_lookup_ready_o);
    retire(P0, 5'd3, 32'd111); retire(P1, 5'd7, 32'd222);
    @(posedge clk); #1;
    check("shadow check reports nothing", !verify_done_o && !mispredict_o);

    // counter now 2: spawn
    lookup(1'b1);
    check("spawn requested in cycle 4", oc == 4 && o_req && !o_noskip);
    // the grant was in cycle oc; skip and ring packet came in oc+1 (sampled by lookup loop)
    state_i = PE_VERIFY; mode_i = MODE_LOW;
    @(posedge clk); #1;
    check("low speed: 400 MHz, 1.0 V", freq_mhz_o == 10'd400 && vdd_mv_o == 11'd1000);
    retire(P0, 5'd3, 32'd111);
    ret_and_watch(P1, 5'd7, 32'd222);
    check("verification complete: done", w_done && !w_mis);
    check("two values counted correct (plus shadow)", n_correct_o == 4 && n_incorrect_o == 0);

    // predicted again, wrong value
    state_i = PE_SPEC; mode_i = MODE_HIGH;
    lookup(1'b1);
    check("spawn requested again", o_req);
    state_i = PE_VERIFY;
    @(posedge clk);
    ret_and_watch(P0, 5'd3, 32'd112);
    check("wrong value: mispredict", w_mis && !w_done);

    // refused spawn: the trace is executed here
    state_i = PE_SPEC;
    lookup(1'b0);
    check("refused spawn: request in cycle 4", oc == 4 && o_req && !o_noskip);
    check("refused spawn: noskip next cycle", dp_noskip_o);
    retire(P0, 5'd3, 32'd111); retire(P1, 5'd7, 32'd222);
    @(posedge clk); #1;

    // packet from the previous PE starts the datapath
    @(negedge clk);
    ring_in_valid_i = 1; ring_in_i = '0; ring_in_i.start_pc = 32'h0040_8000; ring_in_i.nregs = 1;
    #1;
    check("ring packet starts the datapath", dp_start_o && dp_start_pkt_o.start_pc == 32'h0040_8000);
    @(negedge clk); ring_in_valid_i = 0;

    check("one ring packet per grant", n_pkts == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pkts = 0;
  // watch the ring packet of every grant
  always @(posedge clk) begin
    #2;
    if (ring_out_valid_o) begin
      n_pkts++;
      check("skip with the ring packet", dp_skip_o && dp_stop_pc_o == TN);
      check("ring packet: start at nextPC", ring_out_o.start_pc == TN && ring_out_o.nregs == 2);
      check("ring packet: registers", ring_out_o.rids[0] == 5'd3 && ring_out_o.rids[1] == 5'd7);
      check("ring packet: values", ring_out_o.values[0] == 32'd111 && ring_out_o.values[1] == 32'd222);
    end
  end

  logic w_done, w_mis;
  task automatic ret_and_watch(pc_t pc, rid_t r, word_t v);
    @(negedge clk);
    dp_ret_valid_i = 1; dp_ret_pc_i = pc; dp_ret_rid_i = r; dp_ret_value_i = v;
    dp_trace_end_i = (pc == P1);
    @(posedge clk); #1;
    dp_ret_valid_i = 0; dp_trace_end_i = 0;
    w_done = verify_done_o; w_mis = mispredict_o;
  endtask
endmodule
