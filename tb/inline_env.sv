// inline_env: test environment around inline_intr_top.
//
// It plays everything outside the design:
//   * instruction memory: user code is a pure function of the PC (a hash
//     picks ALU, load, store or branch; loads and stores walk pages with some
//     locality plus a set of 96 far pages, which a 128-entry TLB can hold
//     and a 16-entry one cannot; a few branches are taken, which the
//     not-taken fetch turns into mispredicts; a block of 32 user instructions
//     in every 4 KB of code are TLB writes, which must all be refused). The handler at HANDLER_BASE is HLEN
//     instructions: ALU work, a TLB write, and the return from interrupt.
//   * a behavioural out-of-order execution core: every dispatched instruction
//     waits a random latency, up to WBW finish per cycle in any order, loads
//     and stores translate through the design's TLB ports (a miss comes back
//     as an exception), kill_mask drops entries and replay_mask re-queues them.
//     The handler's TLB write installs BadVAddr's page with the page-table
//     formula pfn = vpn ^ PFN_KEY. User instructions that arrive while the
//     mode is INLINE are held back from execution until it ends, as the
//     evaluated machine stalled user issue to its queues during the handler.
//   * resources for the fit check: execution-queue space and free registers
//     are plentiful except in short windows, so each fallback reason occurs.
// Checks: user instructions retire exactly in program order (pc after pc,
// taken branches to their target); every translated address matches the
// page-table formula; the excepting instruction retires after the whole
// handler (prepend, conventional) or before any of it (append); every handler
// retires HLEN instructions; and each mechanism of the design occurs.
// finished rises once TARGET user instructions have retired.
module inline_env
  import inline_pkg::*;
#(
  parameter scheme_e     SCHEME       = SCHEME_PREPEND,
  parameter int unsigned N            = 80,
  parameter int unsigned FW           = 4,
  parameter int unsigned RW           = 4,
  parameter int unsigned WBW          = 4,
  parameter int unsigned HLEN         = 21,
  parameter int unsigned LP           = 2,
  parameter addr_t       HANDLER_BASE = 32'h0000_8000,
  parameter addr_t       RESET_PC     = 32'h0001_0000,
  parameter int unsigned TARGET       = 3000,
  parameter int unsigned SEED         = 1,
  parameter bit          NO_INLINE    = 1'b0,  // never offer room for a handler
  localparam int unsigned IW          = $clog2(N),
  localparam int unsigned CW          = $clog2(N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  addr_t           imem_addr,
  output instr_t          imem_data   [FW],
  input  logic [FW-1:0]   disp_valid,
  input  logic [IW-1:0]   disp_idx    [FW],
  input  addr_t           disp_pc     [FW],
  input  instr_t          disp_instr  [FW],
  input  logic [FW-1:0]   disp_priv,
  input  map_src_e        disp_map    [FW],
  input  logic [IW-1:0]   disp_map_idx[FW],
  output wb_t             wb          [WBW],
  output logic [IW-1:0]   wb_idx      [WBW],
  input  logic [N-1:0]    kill_mask,
  input  logic [N-1:0]    replay_mask,
  output logic [CW-1:0]   iq_free,
  output logic [7:0]      preg_free,
  output logic [7:0]      front_need,
  output addr_t           tlb_vaddr   [LP],
  input  logic [LP-1:0]   tlb_hit,
  input  addr_t           tlb_paddr   [LP],
  input  logic [RW-1:0]   commit_valid,
  input  rob_entry_t      commit_entry[RW],
  input  mode_e           mode,
  input  addr_t           epc,
  input  addr_t           badvaddr,
  input  stats_t          stats,
  output logic            finished,
  output int              checks,
  output int              failures,
  output int              cov_checks,
  output int              cov_missing
);
  localparam logic [18:0] PFN_KEY   = 19'h2_A5A5;

  // ------------------------------------------------------------ program
  function automatic logic [31:0] hash(addr_t pc);
    logic [31:0] h;
    h = pc ^ (pc >> 7) ^ 32'h9E37_79B9;
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    return h ^ (h >> 16);
  endfunction

  function automatic instr_t instr_at(addr_t pc);
    instr_t      ins;
    logic [31:0] h;
    int unsigned k, page;
    if (pc >= HANDLER_BASE && pc < HANDLER_BASE + 4 * HLEN) begin
      k = (pc - HANDLER_BASE) / 4;
      ins.op  = (k == HLEN - 1) ? OP_RFI : (k == HLEN - 2) ? OP_TLBWR : OP_ALU;
      ins.imm = '0;
      return ins;
    end
    // a block of user TLB writes every 4 KB of code: all must be refused
    if (pc[11:7] == 5'h15) return '{op: OP_TLBWR, imm: '0};
    h = hash(pc);
    if (h[3:0] < 4 || h[3:0] == 4) begin
      // page locality: a window that moves with the code, plus far pages
      if (h[7:5] == 0) page = 4096 + (h[27:16] % 96);
      else             page = 64 + (pc >> 9) % 4096 + h[9:8];
      ins.op  = (h[3:0] == 4) ? OP_STORE : OP_LOAD;
      ins.imm = addr_t'(page) << PAGE_OFFS_W | addr_t'(h[20:8] & 13'h1FF8);
    end else if (h[3:0] == 5 || h[3:0] == 6) begin
      ins.op  = OP_BRANCH;
      ins.imm = pc + 4 * (2 + h[13:8] % 24);
    end else begin
      ins.op  = OP_ALU;
      ins.imm = '0;
    end
    return ins;
  endfunction

  function automatic logic taken(addr_t pc);
    logic [31:0] h;
    h = hash(pc ^ 32'h5555_0000);
    return h[2:0] == 0;
  endfunction

  function automatic addr_t next_pc(addr_t pc);
    instr_t ins;
    ins = instr_at(pc);
    return (ins.op == OP_BRANCH && taken(pc)) ? ins.imm : pc + 4;
  endfunction

  always_comb
    for (int i = 0; i < FW; i++) imem_data[i] = instr_at(imem_addr + addr_t'(4 * i));

  // ------------------------------------------------------------ exec core
  logic        pend   [N];
  int unsigned ready  [N];
  instr_t      ins_of [N];
  addr_t       pc_of  [N];
  logic        priv_of[N];
  logic        held   [N];  // user instruction that arrived during INLINE
  int unsigned cyc;
  int unsigned held_skips;  // ready instructions held back by the stall

  // selection presented this cycle
  logic          sel_v   [WBW];
  logic [IW-1:0] sel_idx [WBW];
  int            sel_lp  [WBW];  // lookup port, -1 if none

  always_comb
    for (int p = 0; p < WBW; p++) begin
      instr_t ins;
      ins = ins_of[sel_idx[p]];
      wb[p]         = '0;
      wb_idx[p]     = sel_idx[p];
      wb[p].valid   = sel_v[p];
      wb[p].target  = ins.imm;
      if (sel_v[p] && sel_lp[p] >= 0) wb[p].exc = !tlb_hit[sel_lp[p]];
      if (sel_v[p] && ins.op == OP_BRANCH && !priv_of[sel_idx[p]])
        wb[p].mispredict = taken(pc_of[sel_idx[p]]);
      if (sel_v[p] && ins.op == OP_TLBWR) begin
        wb[p].tlb_wr  = 1'b1;
        wb[p].tlb_vpn = badvaddr[ADDR_W-1:PAGE_OFFS_W];
        wb[p].tlb_pfn = badvaddr[ADDR_W-1:PAGE_OFFS_W] ^ PFN_KEY;
      end
    end

  addr_t lk_q [LP];
  assign tlb_vaddr = lk_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      held_skips <= 0;
      for (int j = 0; j < N; j++) begin pend[j] = 1'b0; held[j] = 1'b0; end
      for (int p = 0; p < WBW; p++) begin
        sel_v[p]   <= 1'b0;
        sel_idx[p] <= '0;
        sel_lp[p]  <= -1;
      end
      for (int l = 0; l < LP; l++) lk_q[l] <= '0;
    end else begin
      int unsigned start, nb, nl, ns;
      cyc <= cyc + 1;
      // results presented this cycle are finished
      for (int p = 0; p < WBW; p++) if (sel_v[p]) pend[sel_idx[p]] = 1'b0;
      for (int j = 0; j < N; j++) begin
        if (replay_mask[j]) begin
          pend[j]  = 1'b1;
          ready[j] = cyc + 1 + $urandom_range(0, 3);
        end
        if (kill_mask[j]) pend[j] = 1'b0;
      end
      for (int i = 0; i < FW; i++)
        if (disp_valid[i]) begin
          pend[disp_idx[i]]    = 1'b1;
          ins_of[disp_idx[i]]  = disp_instr[i];
          pc_of[disp_idx[i]]   = disp_pc[i];
          priv_of[disp_idx[i]] = disp_priv[i];
          held[disp_idx[i]]    = !disp_priv[i] && mode == MODE_INLINE;
          ready[disp_idx[i]]   = cyc + 1 +
            ((disp_instr[i].op inside {OP_LOAD, OP_STORE}) ?
               $urandom_range(0, 12) : $urandom_range(0, 4));
        end
      if (mode != MODE_INLINE)
        for (int j = 0; j < N; j++) held[j] = 1'b0;
      for (int j = 0; j < N; j++)
        if (pend[j] && held[j] && ready[j] <= cyc) held_skips <= held_skips + 1;
      // choose what finishes next cycle, from a random starting entry
      start = $urandom_range(0, N - 1);
      nb = 0; nl = 0; ns = 0;
      for (int p = 0; p < WBW; p++) sel_v[p] <= 1'b0;
      for (int k = 0; k < N; k++) begin
        int unsigned j;
        j = (start + k) % N;
        if (ns < WBW && pend[j] && !held[j] && ready[j] <= cyc &&
            !(ins_of[j].op == OP_BRANCH && nb != 0) &&
            !((ins_of[j].op inside {OP_LOAD, OP_STORE}) && nl == LP)) begin
          sel_v[ns]   <= 1'b1;
          sel_idx[ns] <= IW'(j);
          sel_lp[ns]  <= -1;
          if (ins_of[j].op == OP_BRANCH) nb++;
          if (ins_of[j].op inside {OP_LOAD, OP_STORE}) begin
            sel_lp[ns] <= int'(nl);
            lk_q[nl]   <= ins_of[j].imm;
            nl++;
          end
          ns++;
        end
      end
    end
  end

  // resources seen by the fit check: short windows of scarcity
  always_comb begin
    iq_free    = CW'(40);
    preg_free  = 8'd40;
    front_need = 8'd0;
    if (cyc % 1500 >= 700 && cyc % 1500 < 760) iq_free   = CW'(10);
    if (cyc % 1500 >= 1100 && cyc % 1500 < 1160) preg_free = 8'd6;
    if (NO_INLINE) iq_free = '0;
  end

  // ------------------------------------------------------------ checkers
  addr_t       exp_pc;
  int unsigned user_commits, priv_commits;
  int unsigned map_committed, map_saved;
  mode_e       mode_q;
  logic        watch;        // an excepting instruction is awaited
  addr_t       watch_pc;
  int unsigned watch_priv;   // handler retirements when the interrupt was taken
  logic        watch_append;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exp_pc        <= RESET_PC;
      user_commits  <= 0;
      priv_commits  <= 0;
      checks        <= 0;
      failures      <= 0;
      mode_q        <= MODE_NORMAL;
      watch         <= 1'b0;
      map_committed <= 0;
      map_saved     <= 0;
    end else begin
      int unsigned pc_cnt, ck, fl;
      addr_t       e;
      e  = exp_pc;
      pc_cnt = priv_commits;
      ck = 0; fl = 0;
      // retirement order
      for (int i = 0; i < RW; i++)
        if (commit_valid[i] && !commit_entry[i].hole) begin
          if (commit_entry[i].priv) begin
            pc_cnt++;
          end else begin
            ck++;
            if (commit_entry[i].pc != e) begin
              fl++;
              $display("ERROR %m: retired pc %h, expected %h", commit_entry[i].pc, e);
            end
            if (watch && commit_entry[i].pc == watch_pc) begin
              ck++;
              if (watch_append ? (pc_cnt != watch_priv)
                               : (pc_cnt != watch_priv + HLEN)) begin
                fl++;
                $display("ERROR %m: excepting pc %h retired after %0d handler instructions",
                         watch_pc, pc_cnt - watch_priv);
              end
              watch <= 1'b0;
            end
            e = next_pc(commit_entry[i].pc);
          end
        end
      exp_pc       <= e;
      priv_commits <= pc_cnt;
      // interrupts taken
      mode_q <= mode;
      if (mode_q == MODE_NORMAL && mode != MODE_NORMAL) begin
        watch        <= 1'b1;
        watch_pc     <= epc;
        watch_priv   <= priv_commits;
        watch_append <= (mode == MODE_INLINE) && SCHEME == SCHEME_APPEND;
      end
      // translations
      for (int p = 0; p < WBW; p++)
        if (wb[p].valid && sel_lp[p] >= 0 && tlb_hit[sel_lp[p]]) begin
          addr_t va;
          va = tlb_vaddr[sel_lp[p]];
          ck++;
          if (tlb_paddr[sel_lp[p]] !=
              {va[ADDR_W-1:PAGE_OFFS_W] ^ PFN_KEY, va[PAGE_OFFS_W-1:0]}) begin
            fl++;
            $display("ERROR %m: va %h translated to %h", va, tlb_paddr[sel_lp[p]]);
          end
        end
      // map sources
      for (int i = 0; i < FW; i++)
        if (disp_valid[i]) begin
          if (disp_map[i] == MAP_COMMITTED) map_committed <= map_committed + 1;
          if (disp_map[i] == MAP_SAVED)     map_saved     <= map_saved + 1;
        end
      checks   <= checks + ck;
      failures <= failures + fl;
    end
  end

  // user retirements
  always_ff @(posedge clk) begin
    if (!rst_n) user_commits <= 0;
    else begin
      int unsigned n;
      n = 0;
      for (int i = 0; i < RW; i++)
        if (commit_valid[i] && !commit_entry[i].hole && !commit_entry[i].priv) n++;
      user_commits <= user_commits + n;
    end
  end

  assign finished = user_commits >= TARGET;

  // mechanisms that must each have occurred by the end of the run
  always_comb begin
    logic [31:0] ev [14];
    ev[0]  = stats.inline_taken;
    ev[1]  = stats.trap_taken;
    ev[2]  = stats.short_rob;
    ev[3]  = stats.short_iq;
    ev[4]  = stats.short_reg;
    ev[5]  = (stats.replays > stats.inline_taken) ? 32'd1 : 32'd0;
    ev[6]  = (SCHEME == SCHEME_PREPEND) ? stats.tail_restores : stats.holes;
    ev[7]  = stats.nextpc_fixes;
    ev[8]  = stats.tlbwr_denied;
    ev[9]  = 32'(map_committed);
    ev[10] = 32'(map_saved);
    ev[11] = 32'(stats.flushed);
    ev[12] = 32'(stats.flushed_done);
    ev[13] = 32'(held_skips);
    cov_checks  = 14;
    cov_missing = 0;
    for (int k = 0; k < 14; k++) if (ev[k] == 0) cov_missing++;
  end

  task automatic report();
    $display("%m: user=%0d handler=%0d inline=%0d trap=%0d flushed=%0d (finished %0d) short_rob=%0d short_iq=%0d short_reg=%0d restores=%0d replays=%0d holes=%0d nextpc_fix=%0d denied=%0d map_committed=%0d map_saved=%0d held=%0d",
      user_commits, priv_commits, stats.inline_taken, stats.trap_taken, stats.flushed, stats.flushed_done,
      stats.short_rob, stats.short_iq, stats.short_reg, stats.tail_restores,
      stats.replays, stats.holes, stats.nextpc_fixes, stats.tlbwr_denied,
      map_committed, map_saved, held_skips);
  endtask
endmodule
