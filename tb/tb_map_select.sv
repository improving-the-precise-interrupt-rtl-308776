// tb_map_select: feeds groups of user and handler instructions through the
// map-source select and compares each slot's source and ROB index with the
// expected values: committed map for the first instruction after reset or a
// flush and for the first handler instruction, the saved last-user map for the
// first user instruction after a handler (also when a mispredict changed the
// last user instruction during the handler), and the previous instruction's
// map otherwise.
module tb_map_select;
  import inline_pkg::*;
  localparam int unsigned N = 80, EW = 4, IW = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n, flush, squash_taken;
  logic [EW-1:0] enq_valid, enq_priv;
  logic [IW-1:0] enq_idx [EW];
  logic [IW-1:0] squash_idx;
  map_src_e      src     [EW];
  logic [IW-1:0] src_idx [EW];

  map_select dut (.*);

  task automatic idle();
    enq_valid = '0; enq_priv = '0; flush = 0; squash_taken = 0; squash_idx = '0;
    for (int i = 0; i < EW; i++) enq_idx[i] = '0;
  endtask

  // present a group: n slots from first index, all with privilege priv,
  // then compare the expected sources; exp_idx < 0 means "don't care"
  task automatic group(input int n, input int first, input logic priv,
                       input map_src_e e0, input int i0);
    for (int i = 0; i < EW; i++) begin
      enq_valid[i] = (i < n);
      enq_priv[i]  = priv;
      enq_idx[i]   = IW'(first + i);
    end
    #1;
    checks++;
    if (src[0] != e0 || (i0 >= 0 && src_idx[0] != IW'(i0))) begin
      failures++;
      $display("ERROR t=%0t: slot 0 of group at %0d: %s/%0d, expected %s/%0d",
               $time, first, src[0].name(), src_idx[0], e0.name(), i0);
    end
    for (int i = 1; i < n; i++) begin
      checks++;
      if (src[i] != MAP_PREV || src_idx[i] != IW'(first + i - 1)) begin
        failures++;
        $display("ERROR t=%0t: slot %0d of group at %0d: %s/%0d", $time, i, first,
                 src[i].name(), src_idx[i]);
      end
    end
    @(posedge clk); #1 idle();
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    idle();
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    group(4, 0, 0, MAP_COMMITTED, -1);     // first after reset
    group(4, 4, 0, MAP_PREV, 3);
    group(4, 8, 1, MAP_COMMITTED, -1);     // first handler instruction
    group(1, 12, 1, MAP_PREV, 11);
    group(4, 13, 0, MAP_SAVED, 7);         // first user after the handler
    group(2, 17, 0, MAP_PREV, 16);
    group(2, 20, 1, MAP_COMMITTED, -1);
    group(1, 22, 0, MAP_SAVED, 18);
    // mispredict in user code: next user maps from the branch
    squash_taken = 1; squash_idx = 30; @(posedge clk); #1 idle();
    group(3, 31, 0, MAP_PREV, 30);
    // mispredict while the handler is being fetched
    group(2, 40, 1, MAP_COMMITTED, -1);
    squash_taken = 1; squash_idx = 35; @(posedge clk); #1 idle();
    group(2, 42, 1, MAP_PREV, 41);
    group(4, 44, 0, MAP_SAVED, 35);
    // flush: only the committed map is left
    flush = 1; @(posedge clk); #1 idle();
    group(4, 0, 1, MAP_COMMITTED, -1);
    group(4, 4, 0, MAP_COMMITTED, -1);     // conventional handler: no user before
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
