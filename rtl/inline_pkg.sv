// inline_pkg: types and constants shared by the in-line TLB-miss handling
// blocks (fetch unit, reorder buffer, in-line controller, data TLB).
//
// Instructions are reduced to what the interrupt machinery needs to see: an
// operation class and one 32-bit immediate that holds the data address of a
// load or store or the target of a branch. Addresses are 32 bits and pages are
// 8 KB, so a virtual or physical page number is 19 bits. The 32-bit address
// width and the operation encoding are this design's own choices; the 8 KB page
// size follows the simulated machine the scheme was evaluated on.
package inline_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned PAGE_OFFS_W = 13;                 // 8 KB pages
  localparam int unsigned VPN_W       = ADDR_W - PAGE_OFFS_W;
  localparam int unsigned PFN_W       = ADDR_W - PAGE_OFFS_W;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PFN_W-1:0]  pfn_t;

  // Operation classes seen by the ROB and the fetch unit.
  typedef enum logic [2:0] {
    OP_ALU    = 3'd0,  // any register-to-register work
    OP_LOAD   = 3'd1,  // data access: translated by the data TLB
    OP_STORE  = 3'd2,  // data access: translated by the data TLB
    OP_BRANCH = 3'd3,  // conditional branch, imm = taken target
    OP_TLBWR  = 3'd4,  // privileged TLB write (handler only)
    OP_RFI    = 3'd5   // return from interrupt (last handler instruction)
  } op_e;

  typedef struct packed {
    op_e   op;
    addr_t imm;
  } instr_t;

  // Which way a handler that fits is placed in the reorder buffer.
  typedef enum logic {
    SCHEME_APPEND  = 1'b0,  // after the user instructions, at the tail
    SCHEME_PREPEND = 1'b1   // before the user instructions, ahead of the head
  } scheme_e;

  // Processor interrupt mode. MODE_INLINE is the status bit of the scheme;
  // MODE_TRAP is the conventional flush-and-vector handling.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,
    MODE_INLINE = 2'd1,
    MODE_TRAP   = 2'd2
  } mode_e;

  // Where a newly mapped instruction copies its register map from.
  typedef enum logic [1:0] {
    MAP_PREV      = 2'd0,  // the instruction enqueued just before it
    MAP_COMMITTED = 2'd1,  // the committed (architectural) map
    MAP_SAVED     = 2'd2   // the last user instruction before the handler
  } map_src_e;

  // One reorder-buffer entry.
  typedef struct packed {
    logic   valid;  // occupied
    logic   hole;   // squashed user entry left in place between handler entries
    logic   done;   // finished execution
    logic   exc;    // TLB-miss exception flag
    logic   priv;   // privilege bit: 1 for handler instructions
    op_e    op;
    addr_t  pc;
    addr_t  imm;
  } rob_entry_t;

  // One result coming back from the execution core.
  typedef struct packed {
    logic   valid;
    logic   exc;        // the access missed in the data TLB
    logic   mispredict; // a branch resolved against its prediction
    addr_t  target;     // correct fetch address after a mispredict
    logic   tlb_wr;     // a TLB-write instruction executed
    vpn_t   tlb_vpn;
    pfn_t   tlb_pfn;
  } wb_t;

  // Event counters of the in-line mechanism.
  typedef struct packed {
    logic [31:0] inline_taken;    // interrupts handled in line
    logic [31:0] trap_taken;      // interrupts handled by flushing
    logic [31:0] flushed;         // instructions flushed by those
    logic [31:0] flushed_done;    // of those, already finished executing
    logic [31:0] short_rob;       // flushes: not enough ROB entries
    logic [31:0] short_iq;        // flushes: not enough execution-queue entries
    logic [31:0] short_reg;       // flushes: not enough physical registers
    logic [31:0] tail_restores;   // prepend tail restores
    logic [31:0] replays;         // instructions sent back to re-access the TLB
    logic [31:0] holes;           // mispredicts that left holes around a handler
    logic [31:0] nextpc_fixes;    // mispredicts that rewrote nextPC
    logic [31:0] tlbwr_denied;    // TLB writes refused for lack of privilege
  } stats_t;

endpackage
