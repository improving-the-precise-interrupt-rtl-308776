// tb_inline_rob: directed test of the reorder buffer at the size used to
// illustrate the two schemes: 16 entries, two instructions enqueued and
// retired per cycle, a four-instruction handler. Each scenario starts from
// the same state: head at entry 10, tail at entry 2 (entries 10..15, 0, 1
// hold user instructions) and the instruction in entry 10 flagged with a TLB
// miss. Then it walks
//   * prepend: pointers move to entry 6, the handler fills 6..9, the tail goes
//     back to 2, the handler retires first, the flag is cleared, entry 10 is
//     replayed and retires, later user instructions enter at 2 and 3;
//   * append: the handler fills 2..5, user fetch continues at 6, the flag is
//     cleared, entry 10 retires before the handler;
//   * a mispredict behind an appended handler (holes), a mispredict while a
//     prepended handler is being enqueued (saved tail moves), and a flush.
// Expected pointers, masks and retirement order are written out by hand.
module tb_inline_rob;
  import inline_pkg::*;
  localparam int unsigned N = 16, EW = 2, RW = 2, WBW = 2, HLEN = 4;
  localparam int unsigned IW = $clog2(N), CW = $clog2(N + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              rst_n;
  logic [EW-1:0]     enq_valid, enq_priv, enq_done;
  addr_t             enq_pc    [EW];
  instr_t            enq_instr [EW];
  logic [IW-1:0]     enq_idx   [EW];
  logic [CW-1:0]     free_cnt, count, done_cnt;
  wb_t               wb        [WBW];
  logic [IW-1:0]     wb_idx    [WBW];
  logic [WBW-1:0]    wb_priv;
  logic              squash_valid, squash_taken;
  logic [IW-1:0]     squash_idx;
  logic              flush, prepend_start, prepend_restore, clear_exc;
  logic              prepend_fetch, holes;
  logic              head_valid;
  rob_entry_t        head_entry;
  logic [IW-1:0]     head_idx;
  logic [RW-1:0]     commit_valid;
  rob_entry_t        commit_entry [RW];
  logic [N-1:0]      kill_mask, replay_mask;

  inline_rob #(.N(N), .EW(EW), .RW(RW), .WBW(WBW), .HLEN(HLEN)) dut (.*);

  // outputs settle 1 time unit after the inputs change
  task automatic settle();
    #1;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR t=%0t: %s", $time, what);
    end
  endtask

  task automatic idle();
    enq_valid = '0; enq_priv = '0; enq_done = '0;
    for (int p = 0; p < WBW; p++) begin wb[p] = '0; wb_idx[p] = '0; end
    squash_valid = 0; squash_idx = '0; flush = 0;
    prepend_start = 0; prepend_restore = 0; clear_exc = 0;
  endtask

  // enqueue n (1..2) instructions with the given first pc and privilege
  task automatic enq(input int n, input addr_t pc, input logic priv,
                     input logic done_last = 1'b0);
    for (int i = 0; i < EW; i++) begin
      enq_valid[i] = (i < n);
      enq_priv[i]  = priv;
      enq_done[i]  = done_last && (i == n - 1);
      enq_pc[i]    = pc + addr_t'(4 * i);
      enq_instr[i] = '{op: OP_ALU, imm: '0};
    end
  endtask

  task automatic step();
    @(posedge clk);
    #1 idle();
  endtask

  task automatic finish_idx(input int p, input int idx, input logic exc = 1'b0);
    wb[p].valid = 1'b1;
    wb[p].exc   = exc;
    wb_idx[p]   = IW'(idx);
  endtask

  // which entries retire this cycle, by pc
  addr_t retired [$];
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < RW; i++)
        if (commit_valid[i]) retired.push_back(commit_entry[i].hole ? 32'hDEAD : commit_entry[i].pc);

  // reset, then bring head to 10 and tail to 2 with entry 10 flagged
  task automatic setup();
    idle();
    rst_n = 1'b0;
    step(); step();
    rst_n = 1'b1;
    // ten filler instructions, finished and retired
    for (int g = 0; g < 5; g++) begin enq(2, 32'h100 + 8 * g, 0); step(); end
    for (int g = 0; g < 5; g++) begin finish_idx(0, 2 * g); finish_idx(1, 2 * g + 1); step(); end
    repeat (6) step();
    // user instructions U0..U7 in entries 10..15, 0, 1 (pcs 0x1000 + 4k)
    for (int g = 0; g < 4; g++) begin enq(2, 32'h1000 + 8 * g, 0); step(); end
    finish_idx(0, 10, 1'b1); finish_idx(1, 12); step();
    finish_idx(0, 13); finish_idx(1, 1); step();
    retired.delete();
  endtask

  int sc;
  initial begin : main
    idle();
    // ------------------------------------------------------------ prepend
    setup();
    check(head_idx == 10 && enq_idx[0] == 2, "setup: head 10, tail 2");
    check(count == 8 && free_cnt == 8, "setup: 8 entries in use, 8 free");
    check(done_cnt == 4, "setup: entries 10, 12, 13 and 1 finished");
    check(head_valid && head_entry.exc && head_entry.pc == 32'h1000, "setup: head flagged");
    check(commit_valid == '0, "flagged head blocks retirement");
    prepend_start = 1; step();
    check(head_idx == 6 && enq_idx[0] == 6 && prepend_fetch, "prepend (b): head = tail = 6");
    enq(2, 32'h8000, 1); check(enq_idx[0] == 6 && enq_idx[1] == 7, "prepend (c): handler into 6,7"); step();
    enq(2, 32'h8008, 1, 1'b1); prepend_restore = 1;
    check(enq_idx[0] == 8 && enq_idx[1] == 9, "prepend (d): handler into 8,9"); step();
    check(enq_idx[0] == 2 && !prepend_fetch, "prepend (d): tail restored to 2");
    check(count == 12, "prepend: 12 entries in use");
    // the handler executes (entry 9 is the killed return, already done)
    finish_idx(0, 6); finish_idx(1, 7); step();
    check(commit_valid == 2'b11 && commit_entry[0].priv, "handler entries 6,7 retire");
    finish_idx(0, 8); step();
    check(commit_valid == 2'b11, "handler entries 8,9 retire");
    step();
    check(head_idx == 10 && commit_valid == '0, "head back at 10, still flagged");
    clear_exc = 1; settle();
    check(replay_mask == 16'h0400, $sformatf("clear: only entry 10 replayed (%b)", replay_mask));
    step();
    check(!head_entry.exc && !head_entry.done, "entry 10 unflagged and re-executing");
    enq(2, 32'h1020, 0); step();
    check(enq_idx[0] == 4, "prepend (e): tail at 4 after two user instructions");
    finish_idx(0, 10); finish_idx(1, 11); step();
    finish_idx(0, 14); finish_idx(1, 15); step();
    finish_idx(0, 0); step();
    repeat (4) step();
    sc = 0;
    foreach (retired[i]) if (retired[i] < 32'h8000) sc++;
    check(retired.size() >= 12 && retired[0] == 32'h8000 && retired[3] == 32'h800C &&
          retired[4] == 32'h1000 && retired[5] == 32'h1004, "prepend: handler retires before U0");
    check(retired.size() == 12, "prepend: U8, U9 not finished, not retired");
    for (int i = 4; i + 1 < retired.size(); i++)
      check(retired[i + 1] == retired[i] + 4, "prepend: consecutive user retirement");
    // ------------------------------------------------------------ append
    setup();
    enq(2, 32'h8000, 1);
    check(enq_idx[0] == 2 && enq_idx[1] == 3, "append (b): handler into 2,3"); step();
    enq(2, 32'h8008, 1, 1'b1);
    check(enq_idx[0] == 4 && enq_idx[1] == 5, "append (c): handler into 4,5"); step();
    enq(2, 32'h1020, 0);
    check(enq_idx[0] == 6, "append (d): user fetch resumes at 6"); step();
    check(enq_idx[0] == 8 && head_idx == 10, "append (d): tail 8, head 10");
    finish_idx(0, 4); finish_idx(1, 2); step();   // TLB write done
    clear_exc = 1; finish_idx(0, 3); step();
    finish_idx(0, 10); finish_idx(1, 11); step();
    check(commit_valid == 2'b11 && commit_entry[0].pc == 32'h1000, "append (e): U0 retires first");
    for (int k = 12; k < 16; k++) begin finish_idx(0, k); step(); end
    finish_idx(0, 0); finish_idx(1, 1); step();
    finish_idx(0, 6); finish_idx(1, 7); step();
    repeat (6) step();
    check(retired.size() == 14, "append: all 14 retire");
    check(retired[0] == 32'h1000 && retired[7] == 32'h101C && retired[8] == 32'h8000 &&
          retired[11] == 32'h800C && retired[12] == 32'h1020, "append: program order then handler");
    // ------------------------------------------------ holes behind a handler
    setup();
    enq(2, 32'h8000, 1); step();
    enq(2, 32'h8008, 1, 1'b1); step();
    enq(2, 32'h1020, 0); step();
    // U2 in entry 12 is a mispredicted branch: U3..U7 and the two user
    // instructions after the handler die; the handler stays
    squash_valid = 1; squash_idx = 12; settle();
    check(kill_mask == 16'b1110_0000_1100_0011 && holes, $sformatf("holes: entries 13-15, 0, 1, 6, 7 killed (%b %b)", kill_mask, holes));
    finish_idx(0, 12);
    check(squash_taken, "live branch squashes");
    step(); settle();
    check(squash_taken == 0, "squash is a pulse");
    check(enq_idx[0] == 8 && count == 14, "holes: tail and count unchanged");
    finish_idx(0, 2); finish_idx(1, 3); step();
    finish_idx(0, 4); clear_exc = 1; step();
    finish_idx(0, 10); finish_idx(1, 11); step();
    repeat (10) step();
    check(count == 0, "holes: everything retired");
    check(retired.size() == 14 && retired[2] == 32'h1008 && retired[3] == 32'hDEAD &&
          retired[8] == 32'h8000 && retired[12] == 32'hDEAD, "holes retire as no-ops in place");
    // ------------------------------------- mispredict during prepend fetch
    setup();
    prepend_start = 1; step();
    enq(2, 32'h8000, 1); step();
    squash_valid = 1; squash_idx = 14; finish_idx(0, 14); settle();
    check(kill_mask == 16'b1000_0000_0000_0011 && !holes, "prepend fetch: 15, 0, 1 killed");
    step();
    enq(2, 32'h8008, 1, 1'b1); prepend_restore = 1; step();
    check(enq_idx[0] == 15 && count == 9, "prepend fetch: saved tail moved to 15");
    // ------------------------------------------------------------ flush
    flush = 1; settle();
    check(kill_mask == 16'b0111_1111_1100_0000, "flush kills all live entries");
    step();
    check(count == 0 && !head_valid && free_cnt == 16, "flush empties the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
