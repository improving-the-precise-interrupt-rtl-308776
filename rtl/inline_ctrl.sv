// inline_ctrl: interrupt-mode controller for in-line TLB-miss handling.
//
// It watches the head of the reorder buffer. When the head entry carries the
// TLB-miss flag and the processor is in normal mode, it latches the excepting
// PC and data address (EPC, BadVAddr) and takes one of two paths:
//   * the handler fits (see inline_fit): set the INLINE status bit and start
//     handler fetch without flushing. With the prepend scheme it also tells
//     the ROB to save and move its pointers, and when the last handler group
//     has been enqueued it tells the ROB to restore the tail. The first TLB
//     write by a privileged handler instruction clears every TLB-miss flag in
//     the ROB, so the excepting instruction and any others re-access the TLB.
//     INLINE ends once the whole handler has been fetched and the TLB written.
//   * it does not fit: conventional handling. The ROB is flushed, fetch is
//     sent to the handler with the excepting instruction as return address,
//     and normal mode returns when the return from interrupt retires.
// start_inline, start_trap, prepend_start, prepend_restore and clear_exc are
// combinational single-cycle pulses; mode, epc and badvaddr are registers.
// Reset is synchronous, active low. Counters n_inline and n_trap count the
// interrupts taken each way.
//
// The decision, the INLINE status bit, the pointer save/restore order and the
// TLB write as the "handler finished" signal follow the scheme. Leaving INLINE
// only when both events have happened, the EPC/BadVAddr latches and the
// counters are this design's choices.
module inline_ctrl
  import inline_pkg::*;
#(
  parameter scheme_e SCHEME = SCHEME_PREPEND
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        head_exc,      // valid head entry with TLB-miss flag
  input  addr_t       head_pc,
  input  addr_t       head_vaddr,
  input  logic        fits,
  input  logic        handler_last,  // last handler group enqueued
  input  logic        tlb_written,   // privileged TLB write executed
  input  logic        rfi_commit,    // return from interrupt retired
  output mode_e       mode,
  output logic        start_inline,
  output logic        start_trap,
  output logic        prepend_start,
  output logic        prepend_restore,
  output logic        clear_exc,
  output addr_t       epc,
  output addr_t       badvaddr,
  output logic [31:0] n_inline,
  output logic [31:0] n_trap
);
  logic take, hf_done, tlb_done, hf_now, tlb_now;

  always_comb begin
    take            = (mode == MODE_NORMAL) && head_exc;
    start_inline    = take && fits;
    start_trap      = take && !fits;
    prepend_start   = start_inline && SCHEME == SCHEME_PREPEND;
    prepend_restore = (mode == MODE_INLINE) && handler_last &&
                      SCHEME == SCHEME_PREPEND;
    clear_exc       = (mode == MODE_INLINE) && tlb_written;
    hf_now          = hf_done  || handler_last;
    tlb_now         = tlb_done || tlb_written;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= MODE_NORMAL;
      hf_done  <= 1'b0;
      tlb_done <= 1'b0;
      epc      <= '0;
      badvaddr <= '0;
      n_inline <= '0;
      n_trap   <= '0;
    end else begin
      unique case (mode)
        MODE_NORMAL: if (take) begin
          epc      <= head_pc;
          badvaddr <= head_vaddr;
          hf_done  <= 1'b0;
          tlb_done <= 1'b0;
          if (fits) begin
            mode     <= MODE_INLINE;
            n_inline <= n_inline + 1;
          end else begin
            mode   <= MODE_TRAP;
            n_trap <= n_trap + 1;
          end
        end
        MODE_INLINE: begin
          hf_done  <= hf_now;
          tlb_done <= tlb_now;
          if (hf_now && tlb_now) mode <= MODE_NORMAL;
        end
        MODE_TRAP: if (rfi_commit) mode <= MODE_NORMAL;
        default: mode <= MODE_NORMAL;
      endcase
    end
  end

  a_one_path: assert property (@(posedge clk) disable iff (!rst_n)
    !(start_inline && start_trap))
    else $error("inline_ctrl: both paths taken");
endmodule
