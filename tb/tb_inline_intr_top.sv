// tb_inline_intr_top: end-to-end test of the in-line TLB-miss mechanism with
// both handler placements side by side: one core uses the prepend scheme, the
// other the append scheme, each running the same synthetic program with TLB
// misses, mispredicts, resource shortages and refused user TLB writes. Each
// bench checks program-order retirement, translations, the handler's place
// relative to the excepting instruction, and that every mechanism occurred.
module tb_inline_intr_top;
  import inline_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic fin_p, fin_a;
  int   ck_p, fl_p, cc_p, cm_p, ck_a, fl_a, cc_a, cm_a;
  int   checks, failures;

  inline_bench #(.SCHEME(SCHEME_PREPEND), .TARGET(20000)) b_prepend (
    .clk, .finished(fin_p), .checks(ck_p), .failures(fl_p),
    .cov_checks(cc_p), .cov_missing(cm_p), .stats());
  inline_bench #(.SCHEME(SCHEME_APPEND), .TARGET(20000)) b_append (
    .clk, .finished(fin_a), .checks(ck_a), .failures(fl_a),
    .cov_checks(cc_a), .cov_missing(cm_a), .stats());

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    b_prepend.report();
    b_append.report();
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck_p + ck_a, fl_p + fl_a + 1);
    $finish;
  end

  initial begin
    wait (fin_p && fin_a);
    @(posedge clk);
    b_prepend.report();
    b_append.report();
    checks   = ck_p + ck_a + cc_p + cc_a;
    failures = fl_p + fl_a + cm_p + cm_a;
    if (cm_p != 0) $display("ERROR: prepend core missed %0d mechanisms", cm_p);
    if (cm_a != 0) $display("ERROR: append core missed %0d mechanisms", cm_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
