// tb_inline_ctrl: drives the controller of each scheme (prepend and append)
// through in-line handling with the handler finishing fetch before and after
// its TLB write, through conventional handling when the handler does not fit,
// and checks every pulse, the mode register, the latched EPC and BadVAddr and
// the counters against the expected sequence written out here.
module tb_inline_ctrl;
  import inline_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  rst_n, head_exc, fits, handler_last, tlb_written, rfi_commit;
  addr_t head_pc, head_vaddr;
  mode_e       mode      [2];
  logic [1:0]  s_inline, s_trap, p_start, p_restore, clr;
  addr_t       epc       [2], badvaddr [2];
  logic [31:0] n_inline  [2], n_trap   [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    inline_ctrl #(.SCHEME(g == 0 ? SCHEME_PREPEND : SCHEME_APPEND)) dut (
      .clk, .rst_n, .head_exc, .head_pc, .head_vaddr, .fits, .handler_last,
      .tlb_written, .rfi_commit, .mode(mode[g]), .start_inline(s_inline[g]),
      .start_trap(s_trap[g]), .prepend_start(p_start[g]),
      .prepend_restore(p_restore[g]), .clear_exc(clr[g]), .epc(epc[g]),
      .badvaddr(badvaddr[g]), .n_inline(n_inline[g]), .n_trap(n_trap[g]));
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR t=%0t: %s", $time, what); end
  endtask

  task automatic idle();
    head_exc = 0; fits = 0; handler_last = 0; tlb_written = 0; rfi_commit = 0;
  endtask

  task automatic step();
    @(posedge clk); #1 idle(); #1;
  endtask

  // in-line handling; tlb_first: TLB written before the last handler group
  task automatic inline_case(input logic tlb_first, input addr_t pc, input addr_t va,
                             input int k);
    head_exc = 1; fits = 1; head_pc = pc; head_vaddr = va; #1;
    check(s_inline == 2'b11 && s_trap == 2'b00, "start in line, both schemes");
    check(p_start == 2'b01, "pointer save only with prepend");
    step();
    check(mode[0] == MODE_INLINE && mode[1] == MODE_INLINE, "INLINE set");
    check(epc[0] == pc && badvaddr[1] == va, "EPC and BadVAddr latched");
    check(n_inline[0] == 32'(k) && n_inline[1] == 32'(k), "in-line counter");
    head_exc = 1; fits = 1; #1;
    check(s_inline == 2'b00 && s_trap == 2'b00, "no second start while INLINE");
    step();
    if (tlb_first) begin
      tlb_written = 1; #1;
      check(clr == 2'b11, "TLB write clears the flags");
      step();
      check(mode[0] == MODE_INLINE, "still INLINE: handler not all fetched");
      handler_last = 1; #1;
      check(p_restore == 2'b01, "tail restore only with prepend");
      step();
    end else begin
      handler_last = 1; #1;
      check(p_restore == 2'b01, "tail restore only with prepend");
      step();
      check(mode[0] == MODE_INLINE && mode[1] == MODE_INLINE, "still INLINE: no TLB write yet");
      check(clr == 2'b00, "no clear without TLB write");
      tlb_written = 1; #1;
      check(clr == 2'b11, "TLB write clears the flags");
      step();
    end
    check(mode[0] == MODE_NORMAL && mode[1] == MODE_NORMAL, "back to normal");
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    idle(); head_pc = '0; head_vaddr = '0;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1; #1;
    check(mode[0] == MODE_NORMAL && s_inline == 0 && s_trap == 0, "idle after reset");
    inline_case(1'b0, 32'h0001_2340, 32'h00A0_2008, 1);
    repeat (2) step();
    inline_case(1'b1, 32'h0001_5554, 32'h0BCD_E000, 2);
    // does not fit: conventional handling
    head_exc = 1; fits = 0; head_pc = 32'h0001_7770; head_vaddr = 32'h1234_5678; #1;
    check(s_trap == 2'b11 && s_inline == 2'b00 && p_start == 2'b00, "start conventional");
    step();
    check(mode[0] == MODE_TRAP && mode[1] == MODE_TRAP && n_trap[0] == 1, "TRAP mode");
    check(epc[1] == 32'h0001_7770 && badvaddr[0] == 32'h1234_5678, "trap EPC latched");
    tlb_written = 1; handler_last = 1; #1;
    check(clr == 2'b00 && p_restore == 2'b00, "no in-line actions in TRAP mode");
    step();
    check(mode[0] == MODE_TRAP, "TRAP holds until the return retires");
    rfi_commit = 1; step();
    check(mode[0] == MODE_NORMAL && mode[1] == MODE_NORMAL, "return ends TRAP");
    check(n_inline[0] == 2 && n_trap[1] == 1, "final counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
