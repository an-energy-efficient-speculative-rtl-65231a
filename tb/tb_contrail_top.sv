// tb_contrail_top: end-to-end test of the Contrail chip-multiprocessor at its
// default sizes (four PEs, 1024-entry trace tables, 4096-entry value
// predictors).
//
// The test bench models each PE's datapath at the level of traces. The
// program is a loop of NK traces of L instructions run NITER times; trace k
// has two live-out registers whose values follow fixed rules: one is constant
// (it changes once, for trace 0, at iteration PHASE), the other is constant
// (traces 0..5), a stride sequence (trace 6) or pseudo-random (trace 7). A PE running the
// speculation stream looks up each trace start; on "noskip" it retires the
// trace's instructions itself, on "skip" it becomes a verification stream and
// retires them at its own (low-speed) clock enable, signalling the end of the
// trace with the last one. A packet from the ring starts a PE as
// the new head where the spawning PE left off; a PE recovered after a
// misprediction continues after the trace it verified.
//
// Checks: exactly one speculation stream at all times; verification PEs at
// 400 MHz / 1.0 V and a settled speculation PE at 800 MHz / 1.3 V; every
// recovery follows a verification whose ring packet held a wrong value and
// every release one whose packet was right; the program completes
// (all_done). Each mechanism must happen at least once: spawn, refused spawn,
// release, misprediction, squash, shadow-only execution (noskip), mode
// switch, ring start. The execution cluster beside the ring is driven with
// random groups and checked for values, steering, structural stalls and
// misprediction flags.
module tb_contrail_top;
  import contrail_pkg::*;
  localparam int N = 4, W = 4, NU = 6;
  localparam int NK = 8, NITER = 24, PHASE = 12, L = 10;

  logic clk = 0, rst_n = 0, start_i = 0, finish_i;
  logic all_done_o;
  pe_state_e [N-1:0] pe_state_o;
  logic [1:0] head_o;
  logic [N-1:0] squash_o, recover_o;
  logic [N-1:0] dp_lookup_valid_i = '0, dp_ret_valid_i = '0, dp_tt_wr_valid_i = '0, dp_trace_end_i = '0;
  pc_t  [N-1:0] dp_lookup_pc_i = '0, dp_ret_pc_i = '0, dp_tt_wr_pc_i = '0;
  rid_t [N-1:0] dp_ret_rid_i = '0;
  word_t [N-1:0] dp_ret_value_i = '0;
  trace_info_t [N-1:0] dp_tt_wr_info_i = '0;
  logic [N-1:0] dp_lookup_ready_o, dp_skip_o, dp_noskip_o, dp_start_o;
  pc_t  [N-1:0] dp_stop_pc_o;
  spawn_pkt_t [N-1:0] dp_start_pkt_o;
  logic [N-1:0] pe_clk_en_o;
  logic [N-1:0][10:0] pe_vdd_mv_o;
  logic [N-1:0][9:0] pe_freq_mhz_o;
  logic [31:0] n_spawn_o, n_spawn_stall_o, n_release_o, n_mispredict_o, n_squashed_o;
  logic [31:0] n_value_correct_o, n_value_incorrect_o;
  logic    [W-1:0] ex_valid_i = '0, ex_predictable_i = '0;
  alu_op_e [W-1:0] ex_op_i;
  word_t   [W-1:0] ex_a_i, ex_b_i, ex_pred_value_i;
  logic    [W-1:0][7:0] ex_tag_i;
  logic    [2:0] ex_accept_o;
  logic    [NU-1:0] ex_res_valid_o, ex_res_predicted_o, ex_res_mispredict_o;
  word_t   [NU-1:0] ex_res_value_o;
  logic    [NU-1:0][7:0] ex_res_tag_o;
  logic    [31:0] ex_fast_ops_o, ex_slow_ops_o, ex_fast_busy_o, ex_slow_busy_o;

  int checks = 0, failures = 0;

  contrail_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: program did not complete");
    $display("spawns=%0d refused=%0d releases=%0d mispredictions=%0d squashed=%0d noskip=%0d starts=%0d fin=%0d",
             n_spawn_o, n_spawn_stall_o, n_release_o, n_mispredict_o, n_squashed_o, ev_noskip, ev_start, ev_finish);
    for (int p = 0; p < N; p++) $display("PE%0d state=%0d ds=%0d pos=%0d/%0d", p, pe_state_o[p], ds[p], pos_i[p], pos_k[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- the program ----------------
  function automatic pc_t tstart(int k); return 32'h0040_0000 + 32'(k) * 32'h100; endfunction
  // trace k: L instructions at tstart(k) + 8*m; the live-out producers are m = 1 and m = 4
  function automatic int  pmpos(int j); return (j == 0) ? 1 : 4; endfunction
  function automatic pc_t tprod(int k, int j); return tstart(k) + 32'(8 * pmpos(j)); endfunction
  function automatic rid_t trid(int k, int j); return rid_t'(2 + 2 * k + j); endfunction
  function automatic word_t tval(int i, int k, int j);
    if (j == 0) return (k == 0 && i >= PHASE) ? 32'd5555 : 32'(1000 * k + 7);
    case (k)
      6: return 32'(100 * k + 4 * i);
      7: return (32'(i) * 32'h9E37_79B9) ^ (32'(k) * 32'h85EB_CA6B);
      default: return 32'(2000 + k);
    endcase
  endfunction

  // ---------------- event counters ----------------
  int ev_noskip = 0, ev_start = 0, ev_mode_switch = 0, ev_verify_ok = 0, ev_verify_bad = 0;
  int ev_finish = 0;

  // ---------------- per-PE datapath models ----------------
  typedef enum {D_IDLE, D_LOOKUP, D_WAIT, D_EXEC, D_VERIFY, D_VWAIT, D_FIN} dstate_e;
  dstate_e ds [N];
  int  pos_i [N], pos_k [N];       // where the PE's stream is
  int  nxt_i [N], nxt_k [N];       // where a PE started over the ring resumes
  int  ver_i [N], ver_k [N];       // trace a PE verifies
  int  jj [N];
  logic pkt_known [N], pkt_wrong [N];
  logic booted = 0;
  logic fin_req [N];

  function automatic void advance(ref int i, ref int k);
    k++;
    if (k == NK) begin k = 0; i++; end
  endfunction

  for (genvar p = 0; p < N; p++) begin : g_dp
    initial begin
      ds[p] = D_IDLE; jj[p] = 0; pkt_known[p] = 0; pkt_wrong[p] = 0; fin_req[p] = 0;
    end

    // retire instruction m of trace (i, k)
    function automatic void drive_insn(int i, int k, int m);
      dp_ret_valid_i[p] = 1'b1;
      dp_ret_pc_i[p]    = tstart(k) + 32'(8 * m);
      dp_trace_end_i[p] = (m == L - 1);
      if (m == pmpos(0) || m == pmpos(1)) begin
        dp_ret_rid_i[p]   = trid(k, m == pmpos(0) ? 0 : 1);
        dp_ret_value_i[p] = tval(i, k, m == pmpos(0) ? 0 : 1);
      end else begin
        dp_ret_rid_i[p]   = rid_t'(20 + m);
        dp_ret_value_i[p] = 32'(3 * m + k);
      end
    endfunction

    always @(negedge clk) if (rst_n && booted) begin
      int ni, nk;
      dp_ret_valid_i[p]    = 1'b0;
      dp_trace_end_i[p]    = 1'b0;
      dp_lookup_valid_i[p] = 1'b0;
      fin_req[p]           = 1'b0;
      if (squash_o[p]) begin
        ds[p] = D_IDLE;
      end else if (recover_o[p]) begin
        pos_i[p] = ver_i[p]; pos_k[p] = ver_k[p];
        advance(pos_i[p], pos_k[p]);
        ds[p] = D_LOOKUP;
      end else if (dp_start_o[p]) begin
        ev_start++;
        check("ring packet resumes at the expected trace", dp_start_pkt_o[p].start_pc == tstart(nxt_k[p]));
        // the packet says what the spawning PE predicted: compare with the truth
        begin
          int prev;
          logic bad;
          prev = (p + N - 1) % N;
          bad  = 1'b0;
          for (int j = 0; j < 2; j++)
            if (dp_start_pkt_o[p].values[j] != tval(ver_i[prev], ver_k[prev], j) ||
                dp_start_pkt_o[p].rids[j] != trid(ver_k[prev], j)) bad = 1'b1;
          pkt_known[prev] = 1'b1; pkt_wrong[prev] = bad;
        end
        pos_i[p] = nxt_i[p]; pos_k[p] = nxt_k[p];
        ds[p] = D_LOOKUP;
      end else begin
        unique case (ds[p])
          D_IDLE: ;
          D_LOOKUP: begin
            if (pos_i[p] >= NITER) begin
              fin_req[p] = 1'b1; ev_finish++;
              ds[p] = D_FIN;
            end else begin
              dp_lookup_valid_i[p] = 1'b1;
              dp_lookup_pc_i[p]    = tstart(pos_k[p]);
              if (dp_lookup_ready_o[p]) ds[p] = D_WAIT;
            end
          end
          D_WAIT: begin
            if (dp_noskip_o[p]) begin
              ev_noskip++;
              jj[p] = 0; ds[p] = D_EXEC;
            end else if (dp_skip_o[p]) begin
              check("stop address is the next trace", dp_stop_pc_o[p] == tstart((pos_k[p] + 1) % NK));
              ver_i[p] = pos_i[p]; ver_k[p] = pos_k[p];
              ni = pos_i[p]; nk = pos_k[p];
              advance(ni, nk);
              nxt_i[(p + 1) % N] = ni; nxt_k[(p + 1) % N] = nk;
              pkt_known[p] = 1'b0;
              jj[p] = 0; ds[p] = D_VERIFY;
            end
          end
          D_EXEC: begin
            drive_insn(pos_i[p], pos_k[p], jj[p]);
            jj[p]++;
            if (jj[p] == L) begin advance(pos_i[p], pos_k[p]); ds[p] = D_LOOKUP; end
          end
          D_VERIFY: if (pe_clk_en_o[p]) begin
            drive_insn(ver_i[p], ver_k[p], jj[p]);
            jj[p]++;
            if (jj[p] == L) ds[p] = D_VWAIT;
          end
          D_VWAIT: if (pe_state_o[p] == PE_FREE) begin
            ev_verify_ok++;
            if (pkt_known[p]) check("released after a right prediction", !pkt_wrong[p]);
            ds[p] = D_IDLE;
          end
          D_FIN: ;
          default: ;
        endcase
      end
    end

    // recovery must follow a wrong prediction
    always @(posedge clk) if (rst_n && recover_o[p]) begin
      ev_verify_bad++;
      if (pkt_known[p]) check("recovery after a wrong prediction", pkt_wrong[p]);
    end
  end

  always_comb begin
    finish_i = 1'b0;
    for (int p = 0; p < N; p++) if (fin_req[p]) finish_i = 1'b1;
  end

  // ---------------- invariants ----------------
  int spec_age [N], ver_age [N];
  logic [N-1:0][9:0] last_freq;
  always @(posedge clk) if (rst_n && booted) begin
    #2;
    begin
      int ns;
      ns = 0;
      for (int p = 0; p < N; p++) begin
        if (pe_state_o[p] == PE_SPEC) begin ns++; spec_age[p]++; end else spec_age[p] = 0;
        if (pe_state_o[p] == PE_VERIFY) ver_age[p]++; else ver_age[p] = 0;
        if (ver_age[p] > 1)
          check("verification PE at 400 MHz / 1.0 V", pe_freq_mhz_o[p] == 10'd400 && pe_vdd_mv_o[p] == 11'd1000);
        if (spec_age[p] > 8)
          check("speculation PE at 800 MHz / 1.3 V", pe_freq_mhz_o[p] == 10'd800 && pe_vdd_mv_o[p] == 11'd1300);
        if (pe_freq_mhz_o[p] != last_freq[p]) ev_mode_switch++;
        last_freq[p] = pe_freq_mhz_o[p];
      end
      check("exactly one speculation stream", ns == 1);
    end
  end

  // ---------------- execution cluster ----------------
  int ex_offered = 0, ex_accepted = 0, ex_returned = 0, ex_stall = 0, ex_mis = 0, ex_slow = 0, ex_fast = 0;
  word_t ex_exp [256];
  logic  ex_expmis [256], ex_exppred [256];
  always @(posedge clk) if (rst_n) begin
    #2;
    for (int u = 0; u < NU; u++) if (ex_res_valid_o[u]) begin
      int t;
      t = int'(ex_res_tag_o[u]);
      ex_returned++;
      check("cluster value", ex_res_value_o[u] == ex_exp[t]);
      check("cluster steering", (u >= 3) == ex_exppred[t]);
      check("cluster mispredict flag", ex_res_mispredict_o[u] == ex_expmis[t]);
      if (ex_res_mispredict_o[u]) ex_mis++;
    end
  end

  initial begin
    int tag;
    tag = 0;
    wait (rst_n);
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      ex_valid_i = '0;
      for (int w = 0; w < W; w++) begin
        ex_valid_i[w]       = 1'b1;
        ex_predictable_i[w] = ($urandom_range(0, 1) == 1);
        ex_op_i[w]          = ($urandom_range(0, 1) == 1) ? OP_ADD : OP_XOR;
        ex_a_i[w]           = $urandom;
        ex_b_i[w]           = $urandom;
        ex_tag_i[w]         = 8'((tag + w) % 256);
        ex_pred_value_i[w]  = ((ex_op_i[w] == OP_ADD) ? ex_a_i[w] + ex_b_i[w] : ex_a_i[w] ^ ex_b_i[w])
                              ^ (($urandom_range(0, 7) == 0) ? 32'h1 : 32'h0);
      end
      #1;
      ex_offered += W;
      ex_accepted += int'(ex_accept_o);
      if (int'(ex_accept_o) < W) ex_stall++;
      for (int w = 0; w < int'(ex_accept_o); w++) begin
        int t;
        t = (tag + w) % 256;
        ex_exp[t]     = (ex_op_i[w] == OP_ADD) ? ex_a_i[w] + ex_b_i[w] : ex_a_i[w] ^ ex_b_i[w];
        ex_exppred[t] = ex_predictable_i[w];
        ex_expmis[t]  = ex_predictable_i[w] && (ex_pred_value_i[w] != ex_exp[t]);
        if (ex_predictable_i[w]) ex_slow++; else ex_fast++;
      end
      tag = (tag + int'(ex_accept_o)) % 256;
    end
    @(negedge clk); ex_valid_i = '0;
  end

  // ---------------- run ----------------
  initial begin
    for (int p = 0; p < N; p++) begin spec_age[p] = 0; ver_age[p] = 0; last_freq[p] = 10'd400; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // install the program's traces in every PE's trace table
    for (int k = 0; k < NK; k++) begin
      trace_info_t ti;
      ti = '0;
      ti.next_pc = tstart((k + 1) % NK);
      ti.nregs   = 2;
      for (int j = 0; j < 2; j++) begin ti.rids[j] = trid(k, j); ti.pcs[j] = tprod(k, j); end
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        dp_tt_wr_valid_i[p] = 1'b1; dp_tt_wr_pc_i[p] = tstart(k); dp_tt_wr_info_i[p] = ti;
      end
    end
    @(negedge clk);
    dp_tt_wr_valid_i = '0;
    start_i = 1'b1;
    @(negedge clk);
    start_i = 1'b0;
    pos_i[0] = 0; pos_k[0] = 0; ds[0] = D_LOOKUP;
    booted = 1'b1;

    wait (all_done_o);
    repeat (2) @(posedge clk);
    #3;
    $display("spawns=%0d refused=%0d releases=%0d mispredictions=%0d squashed=%0d noskip=%0d ring_starts=%0d mode_switches=%0d values_ok=%0d values_bad=%0d",
             n_spawn_o, n_spawn_stall_o, n_release_o, n_mispredict_o, n_squashed_o, ev_noskip, ev_start,
             ev_mode_switch, n_value_correct_o, n_value_incorrect_o);
    $display("cluster: offered=%0d accepted=%0d fast=%0d slow=%0d stalls=%0d mispredict_flags=%0d",
             ex_offered, ex_accepted, ex_fast, ex_slow, ex_stall, ex_mis);
    check("program completed (finish reached)", ev_finish > 0);
    check("mechanism: spawn", n_spawn_o > 0);
    check("mechanism: refused spawn (ring full)", n_spawn_stall_o > 0);
    check("mechanism: release after verification", n_release_o > 0);
    check("mechanism: misprediction and recovery", n_mispredict_o > 0);
    check("mechanism: squash of younger streams", n_squashed_o > 0);
    check("mechanism: trace executed without skipping", ev_noskip > 0);
    check("mechanism: ring start of a new head", ev_start > 0);
    check("mechanism: mode switch", ev_mode_switch > 0);
    check("spawn count equals ring starts plus starts lost to squashes", int'(n_spawn_o) >= ev_start);
    check("recoveries counted", int'(n_mispredict_o) == ev_verify_bad);
    check("cluster: every accepted instruction returned", ex_returned == ex_accepted);
    check("cluster: op counters", int'(ex_fast_ops_o) == ex_fast && int'(ex_slow_ops_o) == ex_slow);
    check("cluster mechanism: fast and slow units used", ex_fast > 0 && ex_slow > 0);
    check("cluster mechanism: structural stall", ex_stall > 0);
    check("cluster mechanism: misprediction flag", ex_mis > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
