// inline_bench: one inline_intr_top wired to an inline_env, with reset.
// The handler placement is chosen by SCHEME and the data-TLB size by
// TLB_ENTRIES; all other sizes are the design's defaults. NO_INLINE makes the
// environment report no free execution-queue entries, so that every miss is
// handled conventionally (the flush-and-trap baseline). done rises when the environment has retired its TARGET user
// instructions; checks, failures and the mechanism coverage come from it.
module inline_bench
  import inline_pkg::*;
#(
  parameter scheme_e     SCHEME = SCHEME_PREPEND,
  parameter int unsigned TARGET = 3000,
  parameter int unsigned TLB_ENTRIES = 128,
  parameter bit          NO_INLINE = 1'b0
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cov_checks,
  output int   cov_missing,
  output stats_t stats
);
  localparam int unsigned N   = 80;
  localparam int unsigned FW  = 4;
  localparam int unsigned RW  = 4;
  localparam int unsigned WBW = 4;
  localparam int unsigned LP  = 2;
  localparam int unsigned IW  = $clog2(N);
  localparam int unsigned CW  = $clog2(N + 1);

  logic            rst_n;
  addr_t           imem_addr;
  instr_t          imem_data   [FW];
  logic [FW-1:0]   disp_valid;
  logic [IW-1:0]   disp_idx    [FW];
  addr_t           disp_pc     [FW];
  instr_t          disp_instr  [FW];
  logic [FW-1:0]   disp_priv;
  map_src_e        disp_map    [FW];
  logic [IW-1:0]   disp_map_idx[FW];
  wb_t             wb          [WBW];
  logic [IW-1:0]   wb_idx      [WBW];
  logic [N-1:0]    kill_mask, replay_mask;
  logic [CW-1:0]   iq_free;
  logic [7:0]      preg_free, front_need;
  addr_t           tlb_vaddr   [LP];
  logic [LP-1:0]   tlb_hit;
  addr_t           tlb_paddr   [LP];
  logic [RW-1:0]   commit_valid;
  rob_entry_t      commit_entry[RW];
  mode_e           mode;
  addr_t           epc, badvaddr;
  logic            handler_fetch, prepend_fetch, wait_rfi;
  logic [CW-1:0]   rob_count;
  logic [IW-1:0]   rob_head;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  inline_intr_top #(.SCHEME(SCHEME), .TLB_ENTRIES(TLB_ENTRIES)) dut (
    .clk, .rst_n, .imem_addr, .imem_data,
    .disp_valid, .disp_idx, .disp_pc, .disp_instr, .disp_priv, .disp_map, .disp_map_idx,
    .wb, .wb_idx, .kill_mask, .replay_mask, .iq_free, .preg_free, .front_need,
    .tlb_vaddr, .tlb_hit, .tlb_paddr, .commit_valid, .commit_entry,
    .mode, .epc, .badvaddr, .handler_fetch, .prepend_fetch, .wait_rfi,
    .rob_count, .rob_head, .stats
  );

  inline_env #(.SCHEME(SCHEME), .TARGET(TARGET), .NO_INLINE(NO_INLINE)) env (
    .clk, .rst_n, .imem_addr, .imem_data,
    .disp_valid, .disp_idx, .disp_pc, .disp_instr, .disp_priv, .disp_map, .disp_map_idx,
    .wb, .wb_idx, .kill_mask, .replay_mask, .iq_free, .preg_free, .front_need,
    .tlb_vaddr, .tlb_hit, .tlb_paddr, .commit_valid, .commit_entry,
    .mode, .epc, .badvaddr, .stats, .finished, .checks, .failures,
    .cov_checks, .cov_missing
  );

  task automatic report();
    env.report();
  endtask
endmodule
