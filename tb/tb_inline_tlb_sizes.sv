// tb_inline_tlb_sizes: the evaluated configurations side by side. For each
// data-TLB size of the evaluation (16, 32, 64 and 128 entries) three cores
// run the same synthetic program to TARGET user instructions:
//   * conventional: no handler is ever offered room, so every TLB miss
//     flushes the window (the baseline the in-line schemes are measured
//     against);
//   * append and prepend in-line handling.
// Every core is checked by its environment (program-order retirement,
// translations, handler placement). The table printed at the end gives per
// configuration the TLB misses, the share handled in line, the instructions
// flushed per miss and the cycles per user instruction. Besides the
// environments' checks the bench checks the directions the scheme is meant
// to produce, with margins wide enough for the random latencies:
//   * a smaller TLB misses more often (16 entries against 128);
//   * per TLB size, prepend flushes fewer instructions per miss than the
//     conventional baseline, and needs fewer cycles for the same program;
//   * per TLB size, prepend handles at least as large a share in line as
//     append does, less a small tolerance.
// The program is synthetic (see the environment), so the numbers are not
// those of real programs; only the comparisons are checked.
module tb_inline_tlb_sizes;
  import inline_pkg::*;
  localparam int unsigned TARGET = 8000;
  localparam int NS = 4;   // TLB sizes
  localparam int NK = 3;   // 0 conventional, 1 append, 2 prepend

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   fin   [NS][NK];
  int     ck    [NS][NK];
  int     fl    [NS][NK];
  int     cc    [NS][NK];
  int     cm    [NS][NK];
  stats_t st    [NS][NK];
  int     cyc_done [NS][NK];
  int     cyc;

  for (genvar s = 0; s < NS; s++) begin : g_size
    for (genvar k = 0; k < NK; k++) begin : g_kind
      inline_bench #(
        .SCHEME     (k == 1 ? SCHEME_APPEND : SCHEME_PREPEND),
        .TARGET     (TARGET),
        .TLB_ENTRIES(16 << s),
        .NO_INLINE  (k == 0)
      ) b (
        .clk, .finished(fin[s][k]), .checks(ck[s][k]), .failures(fl[s][k]),
        .cov_checks(cc[s][k]), .cov_missing(cm[s][k]), .stats(st[s][k]));
    end
  end

  logic all_fin;
  always_comb begin
    all_fin = 1'b1;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < NK; k++) all_fin &= fin[s][k];
  end

  // cycle at which each core finished; counting starts after the benches'
  // reset, whose last cycle is cycle 3
  initial begin
    cyc = 0;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < NK; k++) cyc_done[s][k] = 0;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc > 4)
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < NK; k++)
          if (fin[s][k] && cyc_done[s][k] == 0) cyc_done[s][k] <= cyc;
  end

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  function automatic int misses(int s, int k);
    return int'(st[s][k].inline_taken + st[s][k].trap_taken);
  endfunction

  // instructions flushed per miss, times 100
  function automatic int flush_x100(int s, int k);
    return misses(s, k) == 0 ? 0 : int'(st[s][k].flushed) * 100 / misses(s, k);
  endfunction

  // share handled in line, percent
  function automatic int inline_pct(int s, int k);
    return misses(s, k) == 0 ? 0 : int'(st[s][k].inline_taken) * 100 / misses(s, k);
  endfunction

  initial begin : main
    string kname [NK];
    kname = '{"conventional", "append", "prepend"};
    repeat (6) @(posedge clk);
    wait (all_fin);
    repeat (2) @(posedge clk);
    $display("TLB size, scheme: misses, share in line, flushed per miss, cycles per user instruction");
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < NK; k++) begin
        int fx, cx;
        fx = flush_x100(s, k);
        cx = cyc_done[s][k] * 100 / TARGET;
        $display("%0d, %s: %0d misses, %0d%% in line, %0d.%0d%0d flushed/miss, %0d.%0d%0d cycles/instr",
                 16 << s, kname[k], misses(s, k), inline_pct(s, k),
                 fx / 100, (fx / 10) % 10, fx % 10, cx / 100, (cx / 10) % 10, cx % 10);
        checks   += ck[s][k];
        failures += fl[s][k];
      end
    for (int k = 0; k < NK; k++)
      check(misses(0, k) > misses(NS - 1, k),
            $sformatf("%s: 16-entry TLB should miss more than 128-entry", kname[k]));
    for (int s = 0; s < NS; s++) begin
      check(st[s][0].inline_taken == 0, $sformatf("TLB %0d: baseline handled a miss in line", 16 << s));
      check(flush_x100(s, 2) < flush_x100(s, 0),
            $sformatf("TLB %0d: prepend should flush less per miss than conventional", 16 << s));
      check(cyc_done[s][2] < cyc_done[s][0],
            $sformatf("TLB %0d: prepend should finish before conventional", 16 << s));
      check(inline_pct(s, 2) + 10 >= inline_pct(s, 1),
            $sformatf("TLB %0d: prepend should take at least as many misses in line", 16 << s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
