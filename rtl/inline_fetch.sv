// inline_fetch: fetch-address control for in-line and conventional handling
// of TLB-miss interrupts.
//
// The unit keeps two fetch sources. The user PC register doubles as nextPC:
// while the handler is being fetched it is simply not advanced, so user
// fetch later resumes exactly where it stopped. A handler counter walks the
// HLEN handler instructions from HANDLER_BASE, FW per group, and marks them
// privileged. The handler's last instruction, the return from interrupt, is
// passed on already finished (done), so it occupies its ROB slot but does no
// work. When the handler ends:
//   * in line (start_inline): user fetch resumes at nextPC at once and the
//     cycle that delivers the last handler group raises handler_last;
//   * conventional (start_trap): the PC was set to the excepting instruction,
//     fetch stops after the handler until the return from interrupt retires
//     (rfi_commit), then user fetch restarts at that instruction.
// A mispredicted user branch (br_redirect) overwrites nextPC with the correct
// target, also while handler fetch goes on; nextpc_fix flags that case.
//
// Interface: imem_addr is the group address; the instruction memory returns
// FW consecutive instructions in imem_data in the same cycle. A group is
// offered on f_valid and advances only when f_accept is high. Commands are
// single-cycle pulses; the caller holds f_accept low in a command cycle.
// Reset is synchronous, active low, and starts user fetch at RESET_PC.
//
// Following the scheme: user fetch off during handler fetch, resume at
// nextPC, killing the return from interrupt, nextPC overwrite on a mispredict.
// This design's choices: a predict-not-taken sequential user fetch, the
// handler and reset addresses, and entering the RFI as a finished no-op.
module inline_fetch
  import inline_pkg::*;
#(
  parameter int unsigned FW           = 4,
  parameter int unsigned HLEN         = 21,
  parameter addr_t       HANDLER_BASE = 32'h0000_8000,
  parameter addr_t       RESET_PC     = 32'h0001_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction memory
  output addr_t         imem_addr,
  input  instr_t        imem_data [FW],
  // fetch group towards the ROB
  output logic [FW-1:0] f_valid,
  output addr_t         f_pc      [FW],
  output instr_t        f_instr   [FW],
  output logic [FW-1:0] f_priv,
  output logic [FW-1:0] f_done,
  input  logic          f_accept,
  // commands
  input  logic          start_inline,
  input  logic          start_trap,
  input  addr_t         trap_epc,
  input  logic          rfi_commit,
  input  logic          br_redirect,
  input  addr_t         br_target,
  // status
  output logic          handler_fetch,  // handler instructions are being fetched
  output logic          handler_last,   // this group ends the handler
  output logic          wait_rfi,       // conventional handler fetched, waiting
  output logic          nextpc_fix      // nextPC overwritten during handler fetch
);
  localparam int unsigned HCW = $clog2(HLEN + 1);

  addr_t          upc;     // user PC, nextPC while the handler is fetched
  logic [HCW-1:0] hcnt;
  logic           hmode, trap, wrfi;

  int unsigned n_h;  // handler instructions in this group
  always_comb begin
    n_h = HLEN - int'(hcnt);
    if (n_h > FW) n_h = FW;
    imem_addr = hmode ? HANDLER_BASE + addr_t'(4 * int'(hcnt)) : upc;
    for (int i = 0; i < FW; i++) begin
      f_pc[i]    = imem_addr + addr_t'(4 * i);
      f_instr[i] = imem_data[i];
      f_priv[i]  = hmode;
      f_valid[i] = hmode ? (i < n_h) : !wrfi;
      f_done[i]  = hmode && imem_data[i].op == OP_RFI;
    end
    handler_last = hmode && f_accept && (int'(hcnt) + n_h == HLEN);
  end

  assign handler_fetch = hmode;
  assign wait_rfi      = wrfi;
  assign nextpc_fix    = br_redirect && hmode && !start_trap;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc   <= RESET_PC;
      hcnt  <= '0;
      hmode <= 1'b0;
      trap  <= 1'b0;
      wrfi  <= 1'b0;
    end else if (start_trap) begin
      upc   <= trap_epc;
      hcnt  <= '0;
      hmode <= 1'b1;
      trap  <= 1'b1;
      wrfi  <= 1'b0;
    end else begin
      if (start_inline) begin
        hcnt  <= '0;
        hmode <= 1'b1;
        trap  <= 1'b0;
      end
      if (br_redirect) upc <= br_target;
      if (rfi_commit && wrfi) begin
        wrfi <= 1'b0;
        trap <= 1'b0;
      end
      if (f_accept && !start_inline) begin
        if (hmode) begin
          hcnt <= hcnt + HCW'(n_h);
          if (handler_last) begin
            hmode <= 1'b0;
            wrfi  <= trap;
          end
        end else if (!wrfi && !br_redirect) begin
          upc <= upc + addr_t'(4 * FW);
        end
      end
    end
  end

  a_no_accept_in_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    (start_inline || start_trap || br_redirect) |-> !f_accept)
    else $error("inline_fetch: group accepted in a redirect cycle");
endmodule
