// tb_inline_full: the design at its default sizes (80-entry ROB, 4-wide,
// 21-instruction handler, 128-entry TLB, prepend placement) running the
// synthetic program until TARGET user instructions have retired, with the
// same checks as the end-to-end test.
module tb_inline_full;
  import inline_pkg::*;
  localparam int unsigned N      = 80;
  localparam int unsigned FW     = 4;
  localparam int unsigned RW     = 4;
  localparam int unsigned WBW    = 4;
  localparam int unsigned LP     = 2;
  localparam int unsigned IW     = $clog2(N);
  localparam int unsigned CW     = $clog2(N + 1);
  localparam int unsigned TARGET = 50000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic finished;
  int   checks, failures, cov_checks, cov_missing;

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
  stats_t          stats;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  inline_intr_top dut (
    .clk, .rst_n, .imem_addr, .imem_data,
    .disp_valid, .disp_idx, .disp_pc, .disp_instr, .disp_priv, .disp_map, .disp_map_idx,
    .wb, .wb_idx, .kill_mask, .replay_mask, .iq_free, .preg_free, .front_need,
    .tlb_vaddr, .tlb_hit, .tlb_paddr, .commit_valid, .commit_entry,
    .mode, .epc, .badvaddr, .handler_fetch, .prepend_fetch, .wait_rfi,
    .rob_count, .rob_head, .stats
  );

  inline_env #(.TARGET(TARGET)) env (
    .clk, .rst_n, .imem_addr, .imem_data,
    .disp_valid, .disp_idx, .disp_pc, .disp_instr, .disp_priv, .disp_map, .disp_map_idx,
    .wb, .wb_idx, .kill_mask, .replay_mask, .iq_free, .preg_free, .front_need,
    .tlb_vaddr, .tlb_hit, .tlb_paddr, .commit_valid, .commit_entry,
    .mode, .epc, .badvaddr, .stats, .finished, .checks, .failures,
    .cov_checks, .cov_missing
  );

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    env.report();
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    @(posedge clk);
    env.report();
    if (cov_missing != 0) $display("ERROR: %0d mechanisms never occurred", cov_missing);
    $display("TB_RESULT checks=%0d failures=%0d", checks + cov_checks,
             failures + cov_missing);
    $finish;
  end
endmodule
