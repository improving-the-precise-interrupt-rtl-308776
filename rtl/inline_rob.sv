// inline_rob: circular reorder buffer that can take a TLB-miss handler in line.
//
// Instructions enter at the tail and retire in order from the head, up to
// EW per cycle in and RW per cycle out. Each entry carries a done bit, a
// TLB-miss exception flag and a privilege bit; an entry whose flag is set
// blocks retirement when it reaches the head, which is where the in-line
// controller takes the interrupt. Beyond an ordinary ROB it offers:
//
//   * prepend_start: save head and tail in two extra registers and move both
//     pointers HLEN entries in front of the old head, so that the handler is
//     enqueued into the free space ahead of the user instructions and retires
//     first. prepend_restore puts the tail back at its saved position, after
//     which user instructions are enqueued behind the old tail again.
//   * clear_exc: the handler has written the TLB, so every entry with a
//     TLB-miss flag (including one flagged in the same cycle) is returned to
//     the not-executed state and reported in replay_mask for re-execution.
//   * squash: a mispredicted user branch removes the younger user entries.
//     Handler entries are never removed. If a handler entry is younger than the
//     branch (append scheme) the user entries become holes that retire as
//     no-ops and the tail stays; otherwise the tail moves back behind the
//     branch. While a prepended handler is being enqueued the user entries lie
//     between the saved pointers, so age is measured from the saved head and
//     the saved tail is the one moved back.
//   * flush: empties the buffer (conventional interrupt). done_cnt tells how
//     many of the live entries had already finished, i.e. how much completed
//     work a flush would throw away.
//
// Reset is synchronous and active low.
// Timing: writeback, squash, clear and commit act on the clock edge; the
// commit, head, free-count and kill/replay outputs are combinational from the
// current state. The caller must not enqueue more than free_cnt entries or
// enqueue in a cycle with flush, squash or prepend_start.
//
// Following the scheme: per-entry privilege bit, saved head/tail registers,
// the pointer moves of the prepend scheme, clearing the flags on the TLB write,
// holes left by a mispredict in append mode. This design's choices: widths,
// retire width, holes retiring as no-ops, and resetting both pointers to 0 on
// a flush.
module inline_rob
  import inline_pkg::*;
#(
  parameter int unsigned N    = 80,  // entries (instructions in flight)
  parameter int unsigned EW   = 4,   // enqueue width
  parameter int unsigned RW   = 4,   // retire width
  parameter int unsigned WBW  = 4,   // writeback ports
  parameter int unsigned HLEN = 21,  // handler length in instructions
  localparam int unsigned IW  = $clog2(N),
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // enqueue at the tail
  input  logic  [EW-1:0]    enq_valid,
  input  addr_t             enq_pc    [EW],
  input  instr_t            enq_instr [EW],
  input  logic  [EW-1:0]    enq_priv,
  input  logic  [EW-1:0]    enq_done,   // enter already finished (killed RFI)
  output logic  [IW-1:0]    enq_idx   [EW],
  output logic  [CW-1:0]    free_cnt,
  output logic  [CW-1:0]    count,
  output logic  [CW-1:0]    done_cnt,   // live entries that finished execution
  // results from the execution core
  input  wb_t               wb        [WBW],
  input  logic  [IW-1:0]    wb_idx    [WBW],
  output logic  [WBW-1:0]   wb_priv,    // privilege bit of the written entry
  // branch mispredict
  input  logic              squash_valid,
  input  logic  [IW-1:0]    squash_idx,
  output logic              squash_taken,  // the branch was live: redirect fetch
  // interrupt handling
  input  logic              flush,
  input  logic              prepend_start,
  input  logic              prepend_restore,
  input  logic              clear_exc,
  output logic              prepend_fetch,  // tail is inside the prepended handler
  output logic              holes,          // this squash leaves holes
  // head of the buffer
  output logic              head_valid,
  output rob_entry_t        head_entry,
  output logic  [IW-1:0]    head_idx,
  // retirement
  output logic  [RW-1:0]    commit_valid,
  output rob_entry_t        commit_entry [RW],
  // to the execution core
  output logic  [N-1:0]     kill_mask,
  output logic  [N-1:0]     replay_mask
);

  rob_entry_t        ent [N];
  logic [IW-1:0]     head, tail, saved_head, saved_tail;
  logic [CW-1:0]     cnt;
  logic              pf;

  function automatic logic [IW-1:0] idx_add(logic [IW-1:0] a, int unsigned b);
    int unsigned s;
    s = int'(a) + b;
    if (s >= N) s = s - N;
    return IW'(s);
  endfunction

  function automatic logic [IW-1:0] idx_sub(logic [IW-1:0] a, int unsigned b);
    int unsigned s;
    s = int'(a) + N - b;
    if (s >= N) s = s - N;
    return IW'(s);
  endfunction

  // ---------------------------------------------------------------- enqueue
  int unsigned n_enq;
  always_comb begin
    n_enq = 0;
    for (int i = 0; i < EW; i++) begin
      enq_idx[i] = idx_add(tail, i);
      if (enq_valid[i]) n_enq++;
    end
  end

  // ----------------------------------------------------------------- commit
  int unsigned n_commit;
  always_comb begin
    logic ok;
    ok       = 1'b1;
    n_commit = 0;
    for (int i = 0; i < RW; i++) begin
      rob_entry_t e;
      e = ent[idx_add(head, i)];
      commit_entry[i] = e;
      commit_valid[i] = ok && e.valid && (e.hole || (e.done && !e.exc));
      ok = commit_valid[i];
      if (commit_valid[i]) n_commit++;
    end
  end

  // ----------------------------------------------------------------- squash
  logic [N-1:0]  younger, user_kill;
  logic          handler_younger;
  logic          sq_ok;  // the branch itself is still live
  assign sq_ok = squash_valid && !flush && ent[squash_idx].valid &&
                 !ent[squash_idx].hole;
  int unsigned   n_removed;
  logic [IW-1:0] sq_base;
  int unsigned   region_len, br_age;
  always_comb begin
    sq_base    = pf ? saved_head : head;
    region_len = pf ? int'(cnt) - int'(idx_sub(tail, int'(head))) : int'(cnt);
    br_age     = int'(idx_sub(squash_idx, int'(sq_base)));
    handler_younger = 1'b0;
    n_removed  = 0;
    for (int j = 0; j < N; j++) begin
      int unsigned age;
      age = int'(idx_sub(IW'(j), int'(sq_base)));
      younger[j]   = sq_ok && ent[j].valid &&
                     age > br_age && age < region_len;
      user_kill[j] = younger[j] && !ent[j].priv && !ent[j].hole;
      if (younger[j] && ent[j].priv) handler_younger = 1'b1;
    end
    for (int j = 0; j < N; j++)
      if (younger[j] && !handler_younger) n_removed++;
  end

  // squash that shortens the user region (no handler entry behind the branch)
  logic shrink;
  assign shrink = sq_ok && !handler_younger;
  assign squash_taken = sq_ok;
  logic  holes_made;  // a mispredict left holes between handler entries
  assign holes_made = sq_ok && handler_younger && user_kill != '0;

  // ------------------------------------------------------- kill and replay
  always_comb begin
    for (int j = 0; j < N; j++) begin
      kill_mask[j]   = flush ? (ent[j].valid && !ent[j].hole) : user_kill[j];
      replay_mask[j] = 1'b0;
    end
    if (clear_exc && !flush) begin
      for (int j = 0; j < N; j++)
        if (ent[j].valid && !ent[j].hole && !user_kill[j] && ent[j].exc)
          replay_mask[j] = 1'b1;
      for (int p = 0; p < WBW; p++)
        if (wb[p].valid && wb[p].exc && ent[wb_idx[p]].valid &&
            !ent[wb_idx[p]].hole && !user_kill[wb_idx[p]])
          replay_mask[wb_idx[p]] = 1'b1;
    end
  end

  always_comb
    for (int p = 0; p < WBW; p++) wb_priv[p] = ent[wb_idx[p]].priv;

  // finished entries, so a flush can report how much completed work it drops
  always_comb begin
    done_cnt = '0;
    for (int j = 0; j < N; j++)
      if (ent[j].valid && !ent[j].hole && ent[j].done) done_cnt = done_cnt + 1'b1;
  end

  // ------------------------------------------------------------ next state
  logic [IW-1:0] tail_sq;  // tail after a squash of this cycle
  logic [IW-1:0] stail_sq; // saved tail after a squash of this cycle
  always_comb begin
    tail_sq  = (shrink && !pf) ? idx_add(squash_idx, 1) : tail;
    stail_sq = (shrink &&  pf) ? idx_add(squash_idx, 1) : saved_tail;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) ent[j] <= '0;
      head       <= '0;
      tail       <= '0;
      saved_head <= '0;
      saved_tail <= '0;
      cnt        <= '0;
      pf         <= 1'b0;
    end else if (flush) begin
      for (int j = 0; j < N; j++) ent[j].valid <= 1'b0;
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      pf   <= 1'b0;
    end else begin
      // results
      for (int p = 0; p < WBW; p++)
        if (wb[p].valid && ent[wb_idx[p]].valid && !ent[wb_idx[p]].hole) begin
          ent[wb_idx[p]].done <= 1'b1;
          ent[wb_idx[p]].exc  <= wb[p].exc;
        end
      // handler wrote the TLB: flagged entries go back for another access
      if (clear_exc)
        for (int j = 0; j < N; j++)
          if (replay_mask[j]) begin
            ent[j].done <= 1'b0;
            ent[j].exc  <= 1'b0;
          end
      // mispredict
      for (int j = 0; j < N; j++)
        if (younger[j]) begin
          if (handler_younger) begin
            if (user_kill[j]) ent[j].hole <= 1'b1;
          end else begin
            ent[j].valid <= 1'b0;
          end
        end
      // retirement
      for (int i = 0; i < RW; i++)
        if (commit_valid[i]) ent[idx_add(head, i)].valid <= 1'b0;
      // enqueue
      for (int i = 0; i < EW; i++)
        if (enq_valid[i])
          ent[enq_idx[i]] <= '{valid: 1'b1, hole: 1'b0, done: enq_done[i],
                               exc: 1'b0, priv: enq_priv[i],
                               op: enq_instr[i].op, pc: enq_pc[i],
                               imm: enq_instr[i].imm};
      // pointers
      cnt <= CW'(int'(cnt) + n_enq - n_commit - n_removed);
      saved_tail <= stail_sq;
      if (prepend_start) begin
        saved_head <= head;
        saved_tail <= tail_sq;
        head       <= idx_sub(head, HLEN);
        tail       <= idx_sub(head, HLEN);
        pf         <= 1'b1;
      end else begin
        head <= idx_add(head, n_commit);
        if (prepend_restore) begin
          tail <= stail_sq;
          pf   <= 1'b0;
        end else begin
          tail <= idx_add(tail_sq, n_enq);
        end
      end
    end
  end

  assign count         = cnt;
  assign free_cnt      = CW'(N - int'(cnt));
  assign prepend_fetch = pf;
  assign holes         = holes_made;
  assign head_idx      = head;
  assign head_entry    = ent[head];
  assign head_valid    = ent[head].valid && (cnt != '0);

  // ------------------------------------------------------------ assertions
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (n_enq <= N - int'(cnt)))
    else $error("inline_rob: enqueue beyond free space");
  a_no_enq_on_redirect: assert property (@(posedge clk) disable iff (!rst_n)
    ((flush || squash_valid || prepend_start) |-> enq_valid == '0))
    else $error("inline_rob: enqueue in a flush, squash or prepend cycle");
  a_prepend_room: assert property (@(posedge clk) disable iff (!rst_n)
    (prepend_start |-> (N - int'(cnt)) >= HLEN))
    else $error("inline_rob: prepend without room for the handler");

endmodule
