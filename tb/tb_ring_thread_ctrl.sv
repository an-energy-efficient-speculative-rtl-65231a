// tb_ring_thread_ctrl: self-checking test of the ring thread controller
// (four PEs). Boots PE 0, spawns around the ring until the next PE is busy
// (refused spawn), frees a verified PE and spawns across the wrap-around,
// raises two mispredictions in one cycle (the older wins, younger streams
// are squashed, the detecting PE becomes the head), ignores a spawn request
// from a non-head PE, and finishes once the last verification is done.
module tb_ring_thread_ctrl;
  import contrail_pkg::*;
  localparam int N = 4;

  logic        clk = 0, rst_n = 0, start_i = 0, finish_i = 0;
  logic [N-1:0] spawn_req_i = '0, verify_done_i = '0, mispredict_i = '0;
  pe_state_e [N-1:0] state_o;
  logic [1:0]  head_o;
  logic [N-1:0] spawn_grant_o, spawn_new_o, squash_o, recover_o;
  logic        spawn_stall_o, finished_o, all_done_o;
  speed_mode_e [N-1:0] mode_o;
  int          checks = 0, failures = 0;

  ring_thread_ctrl #(.N_PE(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (states %p head %0d)", what, state_o, head_o); end
  endtask

  function automatic logic states_are(pe_state_e s0, pe_state_e s1, pe_state_e s2, pe_state_e s3);
    return state_o[0] == s0 && state_o[1] == s1 && state_o[2] == s2 && state_o[3] == s3;
  endfunction

  // hold the inputs for one cycle; the outputs are checked before the edge
  task automatic step();
    @(posedge clk); #1;
    spawn_req_i = '0; verify_done_i = '0; mispredict_i = '0; start_i = 0; finish_i = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", states_are(PE_FREE, PE_FREE, PE_FREE, PE_FREE));
    start_i = 1; step();
    check("boot: PE0 speculation", states_are(PE_SPEC, PE_FREE, PE_FREE, PE_FREE) && head_o == 0);
    check("boot: PE0 high speed, others low", mode_o == {MODE_LOW, MODE_LOW, MODE_LOW, MODE_HIGH});

    // spawn 0 -> 1 -> 2 -> 3
    for (int h = 0; h < 3; h++) begin
      spawn_req_i[h] = 1; #1;
      check($sformatf("spawn from %0d granted", h), spawn_grant_o[h] && spawn_new_o[h + 1] && !spawn_stall_o);
      step();
      check($sformatf("head moved to %0d", h + 1), head_o == 2'(h + 1) && state_o[h] == PE_VERIFY && state_o[h + 1] == PE_SPEC);
    end
    check("modes follow states", mode_o == {MODE_HIGH, MODE_LOW, MODE_LOW, MODE_LOW});

    // ring full: PE0 still verifying
    spawn_req_i[3] = 1; #1;
    check("next PE busy: refused", spawn_stall_o && spawn_grant_o == '0);
    step();
    check("refused spawn changes nothing", head_o == 3 && states_are(PE_VERIFY, PE_VERIFY, PE_VERIFY, PE_SPEC));

    // PE0 verified: released; spawn across the wrap-around
    verify_done_i[0] = 1; step();
    check("PE0 released", states_are(PE_FREE, PE_VERIFY, PE_VERIFY, PE_SPEC));
    spawn_req_i[3] = 1; #1;
    check("wrap spawn granted", spawn_grant_o[3] && spawn_new_o[0]);
    step();
    check("head wrapped to PE0", head_o == 0 && states_are(PE_SPEC, PE_VERIFY, PE_VERIFY, PE_VERIFY));

    // a non-head PE cannot spawn
    spawn_req_i[1] = 1; #1;
    check("non-head request ignored", spawn_grant_o == '0 && !spawn_stall_o);
    step();

    // mispredictions on PE2 and PE3 together: PE2 is older
    mispredict_i[2] = 1; mispredict_i[3] = 1; #1;
    check("oldest misprediction wins", recover_o == 4'b0100);
    check("younger streams squashed", squash_o == 4'b1001);
    step();
    check("PE2 is the new head", head_o == 2 && states_are(PE_FREE, PE_VERIFY, PE_SPEC, PE_FREE));
    check("PE2 high speed", mode_o[2] == MODE_HIGH && mode_o[0] == MODE_LOW);

    // program end: wait for PE1
    finish_i = 1; step();
    check("finished, verification pending", finished_o && !all_done_o);
    spawn_req_i[2] = 1; #1;
    check("no spawn after finish", spawn_grant_o == '0);
    step();
    verify_done_i[1] = 1; step();
    check("all done", all_done_o && states_are(PE_FREE, PE_FREE, PE_SPEC, PE_FREE));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
