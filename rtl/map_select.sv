// map_select: chooses where each newly enqueued instruction takes its register
// map from, so that in-lined handler instructions never see or release user
// register state.
//
// A renamer normally gives each instruction the map left by the instruction
// before it. With a handler in line that is wrong at two points:
//   * the first handler instruction takes the committed (architectural) map
//     (MAP_COMMITTED), because it retires ahead of the excepting user
//     instruction;
//   * the first user instruction after the handler takes the map of the last
//     user instruction before it (MAP_SAVED), whose ROB index is kept in a
//     temporary register (last_user_idx).
// Every other instruction takes the previous instruction's map (MAP_PREV).
// src_idx names the ROB entry whose map is copied (unused for MAP_COMMITTED).
// A mispredicted user branch makes the branch the last user instruction; a
// flush or reset leaves only the committed map. The outputs are combinational
// from the enqueue inputs and the registers; state changes on the clock edge
// (synchronous, active-low reset). The register map itself belongs to the
// core's renamer and is not part of this block.
//
// The two special cases and the temporary register follow the scheme, which
// describes the logic as a multiplexer; the select encoding and the handling
// of squashes and flushes are this design's choices.
module map_select
  import inline_pkg::*;
#(
  parameter int unsigned N  = 80,
  parameter int unsigned EW = 4,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [EW-1:0] enq_valid,
  input  logic [EW-1:0] enq_priv,
  input  logic [IW-1:0] enq_idx [EW],
  input  logic          flush,
  input  logic          squash_taken,
  input  logic [IW-1:0] squash_idx,
  output map_src_e      src     [EW],
  output logic [IW-1:0] src_idx [EW]
);
  typedef enum logic [1:0] {K_NONE, K_USER, K_HANDLER} kind_e;

  kind_e         prev_kind;
  logic [IW-1:0] prev_idx;
  logic [IW-1:0] lu_idx;
  logic          lu_valid;

  // running values through the group
  kind_e         k_n   [EW+1];
  logic [IW-1:0] i_n   [EW+1];
  logic [IW-1:0] lu_n  [EW+1];
  logic          luv_n [EW+1];

  always_comb begin
    k_n[0]   = prev_kind;
    i_n[0]   = prev_idx;
    lu_n[0]  = lu_idx;
    luv_n[0] = lu_valid;
    for (int s = 0; s < EW; s++) begin
      k_n[s+1]   = k_n[s];
      i_n[s+1]   = i_n[s];
      lu_n[s+1]  = lu_n[s];
      luv_n[s+1] = luv_n[s];
      src[s]     = MAP_PREV;
      src_idx[s] = i_n[s];
      if (enq_valid[s]) begin
        if (enq_priv[s]) begin
          if (k_n[s] != K_HANDLER) src[s] = MAP_COMMITTED;
          k_n[s+1] = K_HANDLER;
        end else begin
          if (k_n[s] == K_NONE) begin
            src[s] = MAP_COMMITTED;
          end else if (k_n[s] == K_HANDLER) begin
            src[s]     = luv_n[s] ? MAP_SAVED : MAP_COMMITTED;
            src_idx[s] = lu_n[s];
          end
          k_n[s+1]   = K_USER;
          lu_n[s+1]  = enq_idx[s];
          luv_n[s+1] = 1'b1;
        end
        i_n[s+1] = enq_idx[s];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      prev_kind <= K_NONE;
      prev_idx  <= '0;
      lu_idx    <= '0;
      lu_valid  <= 1'b0;
    end else if (squash_taken) begin
      lu_idx   <= squash_idx;
      lu_valid <= 1'b1;
      if (prev_kind != K_HANDLER) begin
        prev_kind <= K_USER;
        prev_idx  <= squash_idx;
      end
    end else begin
      prev_kind <= k_n[EW];
      prev_idx  <= i_n[EW];
      lu_idx    <= lu_n[EW];
      lu_valid  <= luv_n[EW];
    end
  end
endmodule
