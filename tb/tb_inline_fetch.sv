// tb_inline_fetch: checks the fetch unit at its defaults (4 wide, 21-instruction
// handler at 0x8000, reset PC 0x10000): sequential user fetch and holding when
// a group is not accepted; in-line handler fetch in groups of 4,4,4,4,4,1 with
// privilege set, the return from interrupt entered as done and handler_last
// on the final group; user fetch resuming at the held nextPC; a mispredict
// during handler fetch rewriting nextPC; conventional handling that stops
// after the handler and restarts at the excepting PC once the return retires.
module tb_inline_fetch;
  import inline_pkg::*;
  localparam int unsigned FW = 4, HLEN = 21;
  localparam addr_t HB = 32'h0000_8000, RPC = 32'h0001_0000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n;
  addr_t         imem_addr;
  instr_t        imem_data [FW];
  logic [FW-1:0] f_valid, f_priv, f_done;
  addr_t         f_pc      [FW];
  instr_t        f_instr   [FW];
  logic          f_accept, start_inline, start_trap, rfi_commit, br_redirect;
  addr_t         trap_epc, br_target;
  logic          handler_fetch, handler_last, wait_rfi, nextpc_fix;

  inline_fetch dut (.*);

  always_comb
    for (int i = 0; i < FW; i++) begin
      addr_t a;
      a = imem_addr + addr_t'(4 * i);
      imem_data[i].op  = (a == HB + 4 * (HLEN - 1)) ? OP_RFI : OP_ALU;
      imem_data[i].imm = a ^ 32'h5A5A_0000;
    end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR t=%0t: %s (addr %h valid %b)", $time, what, imem_addr, f_valid); end
  endtask

  task automatic idle();
    f_accept = 0; start_inline = 0; start_trap = 0; rfi_commit = 0;
    br_redirect = 0; trap_epc = '0; br_target = '0;
  endtask

  task automatic step();
    @(posedge clk); #1 idle(); #1;
  endtask

  task automatic user_group(input addr_t pc);
    check(imem_addr == pc && f_valid == 4'hF && f_priv == 4'h0 && f_done == 4'h0,
          $sformatf("user group at %h", pc));
    check(f_pc[3] == pc + 12 && f_instr[2].imm == ((pc + 8) ^ 32'h5A5A_0000), "group contents");
    f_accept = 1; #1;
    check(!handler_last, "no handler_last on a user group");
    step();
  endtask

  // fetch all handler groups; redirect_at: group index to raise br_redirect before
  task automatic handler(input int redirect_at, input addr_t target);
    int n;
    n = 0;
    for (int g = 0; g < 6; g++) begin
      int cnt;
      cnt = (g < 5) ? 4 : 1;
      if (g == redirect_at) begin
        br_redirect = 1; br_target = target; #1;
        check(nextpc_fix, "mispredict during handler fetch rewrites nextPC");
        step();
      end
      check(handler_fetch && imem_addr == HB + 16 * g, $sformatf("handler group %0d", g));
      check(f_valid == 4'((1 << cnt) - 1) && f_priv[0], "handler group size and privilege");
      check(f_done == ((g == 5) ? 4'b0001 : 4'b0000), "only the return enters as done");
      f_accept = 1; #1;
      check(handler_last == (g == 5), "handler_last on the final group only");
      step();
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    idle();
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1; #1;
    user_group(RPC);
    user_group(RPC + 16);
    step();                                   // not accepted: holds
    user_group(RPC + 32);
    // in line, with a mispredict rewriting nextPC during group 2
    start_inline = 1; step();
    handler(2, 32'h0002_0000);
    check(!handler_fetch, "handler fetch over");
    user_group(32'h0002_0000);
    // in line without mispredict: resumes where it stopped
    start_inline = 1; step();
    handler(-1, '0);
    user_group(32'h0002_0010);
    // mispredict in user code
    br_redirect = 1; br_target = 32'h0003_0004; #1;
    check(!nextpc_fix, "user mispredict is not a nextPC fix");
    step();
    user_group(32'h0003_0004);
    // conventional
    start_trap = 1; trap_epc = 32'h0001_0040; step();
    handler(-1, '0);
    check(wait_rfi && f_valid == 4'h0, "stopped until the return retires");
    step();
    check(wait_rfi && f_valid == 4'h0, "still stopped");
    rfi_commit = 1; step();
    check(!wait_rfi, "return retired");
    user_group(32'h0001_0040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
