// ring_thread_ctrl: thread control of the ring of processing elements.
//
// Exactly one PE runs the speculation stream (the head); others run
// verification streams or are free. Streams are created only by the head,
// always on the next PE of the ring, so the live streams are ordered by their
// distance behind the head: the further behind, the older. The rules follow
// the design:
//   spawn      the head asks to skip a predicted trace; if the next PE is free
//              it becomes the new head (speculation) and the old head turns
//              into a verification stream. If the next PE is busy the request
//              is refused (spawn_stall_o) and the head executes the trace.
//   release    a verification stream that has confirmed all its predictions
//              frees its PE.
//   mispredict the detecting PE squashes every younger stream (speculation
//              included) and becomes the speculation stream itself. If several
//              PEs report in one cycle, the oldest wins.
//   finish     the speculation stream reaches the end of the program and
//              waits; all_done_o is raised once no verification is left.
// start_i boots PE 0 as the head. Grants and squashes are combinational
// from the requests (same cycle); the PE states update at the clock edge.
// Mode outputs: the head runs in high-speed mode, all other PEs in low-speed
// mode (free PEs are parked in low-speed mode, a choice of this design).
module ring_thread_ctrl
  import contrail_pkg::*;
#(
  parameter int N_PE = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start_i,
  input  logic [N_PE-1:0]       spawn_req_i,
  input  logic [N_PE-1:0]       verify_done_i,
  input  logic [N_PE-1:0]       mispredict_i,
  input  logic                  finish_i,       // from the head
  output pe_state_e [N_PE-1:0]  state_o,
  output logic [$clog2(N_PE)-1:0] head_o,
  output logic [N_PE-1:0]       spawn_grant_o,  // to the requesting head
  output logic [N_PE-1:0]       spawn_new_o,    // to the PE that becomes head
  output logic                  spawn_stall_o,
  output logic [N_PE-1:0]       squash_o,
  output logic [N_PE-1:0]       recover_o,      // PE that becomes head after a misprediction
  output speed_mode_e [N_PE-1:0] mode_o,
  output logic                  finished_o,
  output logic                  all_done_o
);
  localparam int HW = $clog2(N_PE);
  typedef logic [HW-1:0] pe_idx_t;

  pe_state_e [N_PE-1:0] state;
  pe_idx_t              head;
  logic                 running, finished;

  function automatic pe_idx_t nxt(pe_idx_t i);
    return (int'(i) == N_PE - 1) ? '0 : i + 1'b1;
  endfunction
  // How far a PE is behind the head (0 = head, larger = older).
  function automatic pe_idx_t behind(pe_idx_t i, pe_idx_t h);
    return (i <= h) ? pe_idx_t'(h - i) : pe_idx_t'(N_PE - int'(i) + int'(h));
  endfunction

  // oldest mispredicting verification stream
  logic    mis_any;
  pe_idx_t mis_pe;
  always_comb begin
    mis_any = 1'b0;
    mis_pe  = '0;
    for (int i = 0; i < N_PE; i++)
      if (mispredict_i[i] && state[i] == PE_VERIFY &&
          (!mis_any || behind(pe_idx_t'(i), head) > behind(mis_pe, head))) begin
        mis_any = 1'b1;
        mis_pe  = pe_idx_t'(i);
      end
  end

  always_comb begin
    spawn_grant_o = '0;
    spawn_new_o   = '0;
    spawn_stall_o = 1'b0;
    squash_o      = '0;
    recover_o     = '0;
    if (running) begin
      if (mis_any) begin
        recover_o[mis_pe] = 1'b1;
        for (int i = 0; i < N_PE; i++)
          if (state[i] != PE_FREE && behind(pe_idx_t'(i), head) < behind(mis_pe, head))
            squash_o[i] = 1'b1;
      end else if (spawn_req_i[head] && !finished) begin
        if (state[nxt(head)] == PE_FREE) begin
          spawn_grant_o[head]    = 1'b1;
          spawn_new_o[nxt(head)] = 1'b1;
        end else begin
          spawn_stall_o = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= {N_PE{PE_FREE}};
      head     <= '0;
      running  <= 1'b0;
      finished <= 1'b0;
    end else if (start_i) begin
      state    <= {N_PE{PE_FREE}};
      state[0] <= PE_SPEC;
      head     <= '0;
      running  <= 1'b1;
      finished <= 1'b0;
    end else if (running) begin
      for (int i = 0; i < N_PE; i++)
        if (verify_done_i[i] && state[i] == PE_VERIFY && !squash_o[i] && !recover_o[i])
          state[i] <= PE_FREE;
      if (mis_any) begin
        for (int i = 0; i < N_PE; i++)
          if (squash_o[i]) state[i] <= PE_FREE;
        state[mis_pe] <= PE_SPEC;
        head          <= mis_pe;
        finished      <= 1'b0;
      end else if (|spawn_grant_o) begin
        state[head]      <= PE_VERIFY;
        state[nxt(head)] <= PE_SPEC;
        head             <= nxt(head);
      end else if (finish_i) begin
        finished <= 1'b1;
      end
    end
  end

  always_comb
    for (int i = 0; i < N_PE; i++)
      mode_o[i] = (state[i] == PE_SPEC) ? MODE_HIGH : MODE_LOW;

  logic any_verify;
  int   n_spec;
  always_comb begin
    any_verify = 1'b0;
    n_spec     = 0;
    for (int i = 0; i < N_PE; i++) begin
      if (state[i] == PE_VERIFY) any_verify = 1'b1;
      if (state[i] == PE_SPEC)   n_spec++;
    end
  end

  assign state_o    = state;
  assign head_o     = head;
  assign finished_o = finished;
  assign all_done_o = running && finished && !any_verify;

  // Exactly one speculation stream while running, and it is the head.
  assert property (@(posedge clk) disable iff (!rst_n)
                   running |-> (state[head] == PE_SPEC && n_spec == 1));

endmodule
