// dtlb: fully associative, software-managed data TLB.
//
// Each entry maps one 8 KB virtual page to a physical page. LP lookup ports
// compare the virtual page number against every valid entry in parallel and
// return hit and the physical address in the same cycle (combinational). The
// TLB is filled only by software: a privileged TLB-write instruction of the
// miss handler drives wr_en with a page pair. If the virtual page is already
// present that entry is overwritten, otherwise the entry under a round-robin
// victim pointer is replaced and the pointer advances. A write takes effect
// at the clock edge, so a lookup of the same page hits from the next cycle.
// Reset (synchronous, active low) invalidates every entry.
//
// Full associativity, software refill and the 8 KB page follow the evaluated
// machine, whose TLBs had 16, 32, 64 or 128 entries; 128 is the default here.
// The round-robin replacement and the number of lookup ports are this design's
// choices.
module dtlb
  import inline_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LP      = 2,
  localparam int unsigned EIW    = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  addr_t         lk_vaddr [LP],
  output logic [LP-1:0] lk_hit,
  output addr_t         lk_paddr [LP],
  input  logic          wr_en,
  input  vpn_t          wr_vpn,
  input  pfn_t          wr_pfn
);
  logic [ENTRIES-1:0] valid;
  vpn_t               vpn [ENTRIES];
  pfn_t               pfn [ENTRIES];
  logic [EIW-1:0]     victim;

  always_comb
    for (int p = 0; p < LP; p++) begin
      lk_hit[p]   = 1'b0;
      lk_paddr[p] = '0;
      for (int e = 0; e < ENTRIES; e++)
        if (valid[e] && vpn[e] == lk_vaddr[p][ADDR_W-1:PAGE_OFFS_W]) begin
          lk_hit[p]   = 1'b1;
          lk_paddr[p] = {pfn[e], lk_vaddr[p][PAGE_OFFS_W-1:0]};
        end
    end

  // entry already holding the page being written
  logic           present;
  logic [EIW-1:0] present_idx;
  always_comb begin
    present     = 1'b0;
    present_idx = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (valid[e] && vpn[e] == wr_vpn) begin
        present     = 1'b1;
        present_idx = EIW'(e);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= '0;
      victim <= '0;
    end else if (wr_en) begin
      if (present) begin
        pfn[present_idx] <= wr_pfn;
      end else begin
        valid[victim] <= 1'b1;
        vpn[victim]   <= wr_vpn;
        pfn[victim]   <= wr_pfn;
        victim        <= (int'(victim) == ENTRIES - 1) ? '0 : victim + 1'b1;
      end
    end
  end

  // a page is never held twice, so a lookup matches at most one entry
  logic [LP-1:0] multi_hit;
  always_comb
    for (int p = 0; p < LP; p++) begin
      int unsigned m;
      m = 0;
      for (int e = 0; e < ENTRIES; e++)
        if (valid[e] && vpn[e] == lk_vaddr[p][ADDR_W-1:PAGE_OFFS_W]) m++;
      multi_hit[p] = m > 1;
    end
  a_one_match: assert property (@(posedge clk) disable iff (!rst_n)
    multi_hit == '0)
    else $error("dtlb: page held in two entries");
endmodule
