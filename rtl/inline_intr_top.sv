// inline_intr_top: the instruction-window side of an out-of-order core that
// handles software-managed TLB misses in line instead of flushing.
//
// When a load or store that missed the data TLB reaches the head of the
// reorder buffer, the controller asks whether the refill handler fits in the
// free ROB entries, execution-queue entries and physical registers. If it
// does, user fetch stops, the HLEN handler instructions are fetched and
// enqueued (after the user instructions with the append scheme, in front of
// them with the prepend scheme), user fetch resumes at nextPC, and the
// instructions already in the window keep executing. The handler's TLB write
// fills the TLB and clears every TLB-miss flag, so the excepting instruction
// re-accesses the TLB. If the handler does not fit, the interrupt is handled
// conventionally: flush, run the handler, return to the excepting PC.
//
// Blocks: inline_fetch (fetch PC / nextPC), inline_rob (reorder buffer),
// inline_fit (fit check), inline_ctrl (INLINE status bit and sequencing),
// map_select (register-map source per enqueued instruction) and dtlb.
//
// The execution core (issue queues, functional units, register file, renamer,
// caches, branch predictor) is outside this module:
//   * every enqueued instruction that needs work is sent out on disp_* with
//     its ROB index, together with the map source chosen for it;
//   * results come back on wb/wb_idx; a load or store translates through the
//     tlb_* ports and reports a miss as wb.exc; a branch reports a mispredict
//     with the correct target (one per cycle); a TLB-write instruction reports
//     its page pair, which is written only if its ROB entry is privileged;
//   * kill_mask lists entries the core must drop, replay_mask entries it must
//     execute again; iq_free, preg_free and front_need feed the fit check.
// The instruction memory answers imem_addr with FW instructions in the same
// cycle. Everything is on one clock with a synchronous active-low reset.
//
// The scheme, its two placements, the fit check, nextPC, the killed return
// from interrupt, the privilege bit, the per-entry flag clearing, the
// mispredict holes and the map selection follow the scheme's description.
// Fetching straight into the ROB (no decode/rename stages), predict-not-taken
// user fetch, one mispredict per cycle and the counters are this design's
// choices. Only the pc, imm, exc, valid and hole fields of the head entry are
// used here; the rest of the entry is read through the commit ports.
module inline_intr_top
  import inline_pkg::*;
#(
  parameter scheme_e     SCHEME       = SCHEME_PREPEND,
  parameter int unsigned N            = 80,   // ROB entries
  parameter int unsigned FW           = 4,    // fetch / enqueue width
  parameter int unsigned RW           = 4,    // retire width
  parameter int unsigned WBW          = 4,    // writeback ports
  parameter int unsigned HLEN         = 21,   // handler length
  parameter int unsigned HIQ          = 21,   // handler execution-queue need
  parameter int unsigned HREGS        = 8,    // handler register need
  parameter int unsigned TLB_ENTRIES  = 128,
  parameter int unsigned TLB_LP       = 2,
  parameter addr_t       HANDLER_BASE = 32'h0000_8000,
  parameter addr_t       RESET_PC     = 32'h0001_0000,
  localparam int unsigned IW          = $clog2(N),
  localparam int unsigned CW          = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory
  output addr_t           imem_addr,
  input  instr_t          imem_data   [FW],
  // dispatch to the execution core
  output logic [FW-1:0]   disp_valid,
  output logic [IW-1:0]   disp_idx    [FW],
  output addr_t           disp_pc     [FW],
  output instr_t          disp_instr  [FW],
  output logic [FW-1:0]   disp_priv,
  output map_src_e        disp_map    [FW],
  output logic [IW-1:0]   disp_map_idx[FW],
  // results from the execution core
  input  wb_t             wb          [WBW],
  input  logic [IW-1:0]   wb_idx      [WBW],
  output logic [N-1:0]    kill_mask,
  output logic [N-1:0]    replay_mask,
  // resources of the execution core, for the fit check
  input  logic [CW-1:0]   iq_free,
  input  logic [7:0]      preg_free,
  input  logic [7:0]      front_need,
  // data TLB lookups of the execution core
  input  addr_t           tlb_vaddr   [TLB_LP],
  output logic [TLB_LP-1:0] tlb_hit,
  output addr_t           tlb_paddr   [TLB_LP],
  // retirement
  output logic [RW-1:0]   commit_valid,
  output rob_entry_t      commit_entry[RW],
  // state and counters
  output mode_e           mode,
  output addr_t           epc,
  output addr_t           badvaddr,
  output logic            handler_fetch,  // handler instructions being fetched
  output logic            prepend_fetch,  // ROB tail inside a prepended handler
  output logic            wait_rfi,       // conventional handler awaiting its return
  output logic [CW-1:0]   rob_count,
  output logic [IW-1:0]   rob_head,
  output stats_t          stats
);
  // ------------------------------------------------------------ wiring
  logic [FW-1:0]  f_valid, f_priv, f_done, enq_valid;
  addr_t          f_pc    [FW];
  instr_t         f_instr [FW];
  logic           f_accept;
  logic           handler_last, nextpc_fix;
  logic [IW-1:0]  enq_idx [FW];
  logic [CW-1:0]  free_cnt, rob_done;
  logic [WBW-1:0] wb_priv;
  logic           squash_valid, squash_taken, holes;
  logic [IW-1:0]  squash_idx;
  addr_t          squash_target;
  logic           head_valid, head_exc;
  rob_entry_t     head_entry;
  logic [31:0]    n_inline, n_trap;
  int unsigned    n_replay, n_mispredict;
  logic           fits, short_rob, short_iq, short_reg;
  logic           start_inline, start_trap, prepend_start, prepend_restore;
  logic           clear_exc, rfi_commit;
  logic           tlb_wr;
  vpn_t           tlb_wr_vpn;
  pfn_t           tlb_wr_pfn;
  logic           tlbwr_denied;

  // first mispredict among the results; user branches only
  always_comb begin
    squash_valid  = 1'b0;
    squash_idx    = '0;
    squash_target = '0;
    for (int p = WBW - 1; p >= 0; p--)
      if (wb[p].valid && wb[p].mispredict && !wb_priv[p]) begin
        squash_valid  = 1'b1;
        squash_idx    = wb_idx[p];
        squash_target = wb[p].target;
      end
  end

  // TLB write: accepted only from a privileged ROB entry
  always_comb begin
    tlb_wr       = 1'b0;
    tlb_wr_vpn   = '0;
    tlb_wr_pfn   = '0;
    tlbwr_denied = 1'b0;
    for (int p = WBW - 1; p >= 0; p--)
      if (wb[p].valid && wb[p].tlb_wr) begin
        if (wb_priv[p]) begin
          tlb_wr     = 1'b1;
          tlb_wr_vpn = wb[p].tlb_vpn;
          tlb_wr_pfn = wb[p].tlb_pfn;
        end else begin
          tlbwr_denied = 1'b1;
        end
      end
  end

  assign head_exc = head_valid && head_entry.exc && !head_entry.hole;

  always_comb begin
    rfi_commit = 1'b0;
    for (int i = 0; i < RW; i++)
      if (commit_valid[i] && !commit_entry[i].hole &&
          commit_entry[i].priv && commit_entry[i].op == OP_RFI)
        rfi_commit = 1'b1;
  end

  // a fetch group enters the ROB whole, and never in a redirect cycle
  always_comb begin
    int unsigned n;
    n = 0;
    for (int i = 0; i < FW; i++) if (f_valid[i]) n++;
    f_accept  = (n != 0) && (n <= int'(free_cnt)) && !start_inline &&
                !start_trap && !squash_valid;
    enq_valid = f_accept ? f_valid : '0;
  end

  // ------------------------------------------------------------ blocks
  inline_fetch #(
    .FW(FW), .HLEN(HLEN), .HANDLER_BASE(HANDLER_BASE), .RESET_PC(RESET_PC)
  ) u_fetch (
    .clk, .rst_n,
    .imem_addr, .imem_data,
    .f_valid, .f_pc, .f_instr, .f_priv, .f_done, .f_accept,
    .start_inline, .start_trap, .trap_epc(head_entry.pc),
    .rfi_commit(rfi_commit && mode == MODE_TRAP),
    .br_redirect(squash_taken), .br_target(squash_target),
    .handler_fetch, .handler_last, .wait_rfi, .nextpc_fix
  );

  inline_rob #(
    .N(N), .EW(FW), .RW(RW), .WBW(WBW), .HLEN(HLEN)
  ) u_rob (
    .clk, .rst_n,
    .enq_valid, .enq_pc(f_pc), .enq_instr(f_instr), .enq_priv(f_priv),
    .enq_done(f_done), .enq_idx, .free_cnt, .count(rob_count), .done_cnt(rob_done),
    .wb, .wb_idx, .wb_priv,
    .squash_valid, .squash_idx, .squash_taken,
    .flush(start_trap), .prepend_start, .prepend_restore, .clear_exc,
    .prepend_fetch, .holes,
    .head_valid, .head_entry, .head_idx(rob_head),
    .commit_valid, .commit_entry,
    .kill_mask, .replay_mask
  );

  inline_fit #(
    .HLEN(HLEN), .HIQ(HIQ), .HREGS(HREGS), .CW(CW), .RGW(8)
  ) u_fit (
    .rob_free(free_cnt), .iq_free, .preg_free, .front_need,
    .fits, .short_rob, .short_iq, .short_reg
  );

  inline_ctrl #(.SCHEME(SCHEME)) u_ctrl (
    .clk, .rst_n,
    .head_exc, .head_pc(head_entry.pc), .head_vaddr(head_entry.imm),
    .fits, .handler_last, .tlb_written(tlb_wr), .rfi_commit,
    .mode, .start_inline, .start_trap, .prepend_start, .prepend_restore,
    .clear_exc, .epc, .badvaddr, .n_inline, .n_trap
  );

  map_select #(.N(N), .EW(FW)) u_map (
    .clk, .rst_n,
    .enq_valid, .enq_priv(f_priv), .enq_idx,
    .flush(start_trap), .squash_taken, .squash_idx,
    .src(disp_map), .src_idx(disp_map_idx)
  );

  dtlb #(.ENTRIES(TLB_ENTRIES), .LP(TLB_LP)) u_dtlb (
    .clk, .rst_n,
    .lk_vaddr(tlb_vaddr), .lk_hit(tlb_hit), .lk_paddr(tlb_paddr),
    .wr_en(tlb_wr), .wr_vpn(tlb_wr_vpn), .wr_pfn(tlb_wr_pfn)
  );

  // ------------------------------------------------------------ dispatch
  always_comb
    for (int i = 0; i < FW; i++) begin
      disp_valid[i] = enq_valid[i] && !f_done[i];
      disp_idx[i]   = enq_idx[i];
      disp_pc[i]    = f_pc[i];
      disp_instr[i] = f_instr[i];
      disp_priv[i]  = f_priv[i];
    end

  // ------------------------------------------------------------ counters
  always_comb begin
    n_replay = 0;
    for (int j = 0; j < N; j++) if (replay_mask[j]) n_replay++;
    n_mispredict = 0;
    for (int p = 0; p < WBW; p++)
      if (wb[p].valid && wb[p].mispredict) n_mispredict++;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      if (start_trap) begin
        stats.flushed <= stats.flushed + 32'(rob_count);
        stats.flushed_done <= stats.flushed_done + 32'(rob_done);
        if (short_rob) stats.short_rob <= stats.short_rob + 1;
        if (short_iq)  stats.short_iq  <= stats.short_iq + 1;
        if (short_reg) stats.short_reg <= stats.short_reg + 1;
      end
      if (prepend_restore) stats.tail_restores <= stats.tail_restores + 1;
      stats.replays <= stats.replays + 32'(n_replay);
      if (holes)        stats.holes        <= stats.holes + 1;
      if (nextpc_fix)   stats.nextpc_fixes <= stats.nextpc_fixes + 1;
      if (tlbwr_denied) stats.tlbwr_denied <= stats.tlbwr_denied + 1;
      stats.inline_taken <= n_inline;
      stats.trap_taken   <= n_trap;
    end
  end

  a_one_mispredict: assert property (@(posedge clk) disable iff (!rst_n)
    n_mispredict <= 1)
    else $error("inline_intr_top: more than one mispredict in a cycle");
endmodule
