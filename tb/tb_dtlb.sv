// tb_dtlb: fills the 128-entry TLB with random page pairs and checks every
// lookup against a reference: a page table of what was written, and a queue
// that replays the round-robin victim choice (so the oldest installed page is
// the one evicted). Also checks that rewriting a present page updates it in
// place without evicting anything, that reset empties the TLB, and that the
// page offset passes through unchanged.
module tb_dtlb;
  import inline_pkg::*;
  localparam int ENTRIES = 128, LP = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          rst_n;
  addr_t         lk_vaddr [LP];
  logic [LP-1:0] lk_hit;
  addr_t         lk_paddr [LP];
  logic          wr_en;
  vpn_t          wr_vpn;
  pfn_t          wr_pfn;

  dtlb dut (.*);

  pfn_t ref_map [vpn_t];   // pages currently held
  vpn_t fifo [$];          // installation order = eviction order

  task automatic write(vpn_t v, pfn_t p);
    wr_en = 1; wr_vpn = v; wr_pfn = p;
    @(posedge clk); #1 wr_en = 0;
    if (!ref_map.exists(v)) begin
      if (fifo.size() == ENTRIES) ref_map.delete(fifo.pop_front());
      fifo.push_back(v);
    end
    ref_map[v] = p;
  endtask

  task automatic look(vpn_t v);
    logic [12:0] off;
    off = 13'($urandom);
    lk_vaddr[0] = {v, off};
    lk_vaddr[1] = {v ^ 19'h1, off};
    #1;
    checks++;
    if (lk_hit[0] !== ref_map.exists(v) ||
        (ref_map.exists(v) && lk_paddr[0] !== {ref_map[v], off})) begin
      failures++;
      $display("ERROR: vpn %h hit=%b pa=%h", v, lk_hit[0], lk_paddr[0]);
    end
    checks++;
    if (lk_hit[1] !== ref_map.exists(v ^ 19'h1)) begin
      failures++;
      $display("ERROR: port 1 vpn %h hit=%b", v ^ 19'h1, lk_hit[1]);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wr_en = 0; wr_vpn = '0; wr_pfn = '0;
    lk_vaddr[0] = '0; lk_vaddr[1] = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < 8; v++) look(vpn_t'(v));
    // fill past capacity with pages drawn from a small space, so that hits,
    // rewrites and evictions all occur
    for (int n = 0; n < 600; n++) begin
      vpn_t v;
      v = vpn_t'($urandom_range(0, 299));
      write(v, pfn_t'($urandom));
      look(v);
      look(vpn_t'($urandom_range(0, 299)));
      if (n % 50 == 0) foreach (ref_map[k]) look(k);
    end
    // reset empties it
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    ref_map.delete(); fifo.delete();
    for (int v = 0; v < 300; v += 7) look(vpn_t'(v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
