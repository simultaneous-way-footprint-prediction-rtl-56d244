// ras: return address stack whose entries carry a way-footprint.
//
// Entry = (return address, way-footprint).  Only the top entry is read: when
// a return is predicted, it supplies both the next fetch address and the
// way-footprint of that fetch.  The stack is circular: pushing onto a full
// stack overwrites the oldest entry.
//
// Ports and timing (all writes at the next clock edge):
//   push/push_addr   speculative push when a call is predicted; the new
//                    entry's way-footprint starts as all-way.
//   pop              speculative pop when a return is predicted.
//   top_addr/top_wf  the top entry, combinational.
//   upd_*            way-footprint update from the commit side: the entry
//                    nearest the top whose return address equals upd_addr
//                    takes upd_wf (no change if none matches).
//   cm_push/cm_pop   a call / return committed: moves the committed stack
//                    pointer.
//   recover          branch misprediction: the speculative pointer returns
//                    to the committed one.  If the mispredicted instruction
//                    is itself a call, its return address cm_ret_addr is
//                    pushed at the same time (it was never pushed at fetch).
// The entry format and the way-footprint update follow the document; the
// associative search for the entry to update and pointer recovery are this
// design's choices.
module ras
  import wfp_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  addr_t push_addr,
  input  logic  pop,
  output addr_t top_addr,
  output wf_t   top_wf,
  input  logic  upd_valid,
  input  addr_t upd_addr,
  input  wf_t   upd_wf,
  input  logic  cm_push,
  input  logic  cm_pop,
  input  addr_t cm_ret_addr,
  input  logic  recover
);

  addr_t            addr_q [DEPTH];
  wf_t              wf_q   [DEPTH];
  logic [PTR_W-1:0] tos_q;      // index of the top entry
  logic [PTR_W-1:0] cm_tos_q;   // committed top

  assign top_addr = addr_q[tos_q];
  assign top_wf   = wf_q[tos_q];

  // Entry to receive the way-footprint update: first match from the top down.
  logic             upd_hit;
  logic [PTR_W-1:0] upd_idx;
  always_comb begin
    upd_hit = 1'b0;
    upd_idx = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!upd_hit && addr_q[tos_q - PTR_W'(i)] == upd_addr) begin
        upd_hit = 1'b1;
        upd_idx = tos_q - PTR_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        addr_q[i] <= '0;
        wf_q[i]   <= WF_ALL;
      end
      tos_q    <= '0;
      cm_tos_q <= '0;
    end else begin
      if (upd_valid && upd_hit) wf_q[upd_idx] <= upd_wf;
      if (recover) begin
        tos_q <= cm_tos_q + (cm_push ? PTR_W'(1) : '0) - (cm_pop ? PTR_W'(1) : '0);
        if (cm_push) begin
          addr_q[cm_tos_q + 1'b1] <= cm_ret_addr;
          wf_q[cm_tos_q + 1'b1]   <= WF_ALL;
        end
      end else if (push) begin
        addr_q[tos_q + 1'b1] <= push_addr;
        wf_q[tos_q + 1'b1]   <= WF_ALL;
        tos_q                <= tos_q + 1'b1;
      end else if (pop) begin
        tos_q <= tos_q - 1'b1;
      end
      if (cm_push)     cm_tos_q <= cm_tos_q + 1'b1;
      else if (cm_pop) cm_tos_q <= cm_tos_q - 1'b1;
    end
  end

endmodule
