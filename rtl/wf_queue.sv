// wf_queue: way-footprint queue.
//
// A circular buffer of DEPTH entries (wfq_entry_t).  Entries u_head..u_tail
// belong to fetches that have finished but not committed; the two entries
// just behind u_head are c_1 (last committed fetch) and c_2 (the one before
// it).  They stay reserved, so at most DEPTH-2 fetches can be uncommitted
// and `full` holds fetch when that many are.
//
// Operations, all taking effect at the next clock edge:
//   enqueue  a fetch finished: address, delivering way and isCacheMiss are
//            written at the tail.
//   commit   an instruction commits; if its address equals the address of
//            entry u_head, that entry's isCall, isBTBalloc, isBrMissPred and
//            isTaken are written and u_head advances, which also moves c_1
//            and c_2.  cm_match reports the match.
//   flush    a committed misprediction empties the uncommitted part (tail
//            returns to the new u_head); an enqueue in the same cycle is on
//            the wrong path and is dropped.
// upd_pulse is high in the cycle after a matching commit, when c_1, c_2 and
// c_valid (two commits seen since reset) describe the new state.
// Entry fields and the c_1/c_2 scheme follow the document; DEPTH is this
// design's choice (the document gives no queue size).
module wf_queue
  import wfp_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  // enqueue
  input  logic       enq_valid,
  input  addr_t      enq_addr,
  input  wf_t        enq_wf,
  input  logic       enq_miss,
  output logic       full,
  // commit
  input  logic       cm_valid,
  input  addr_t      cm_addr,
  input  logic       cm_is_call,
  input  logic       cm_is_btb_alloc,
  input  logic       cm_is_br_miss_pred,
  input  logic       cm_is_taken,
  output logic       cm_match,
  // committed entries
  output wfq_entry_t c1,
  output wfq_entry_t c2,
  output logic       c_valid,
  output logic       upd_pulse,
  output logic [PTR_W:0] count
);

  wfq_entry_t       q [DEPTH];
  logic [PTR_W:0]   head_q, tail_q;     // one extra bit for full/empty
  logic [1:0]       ncommit_q;

  assign count    = tail_q - head_q;
  assign full     = count >= (PTR_W+1)'(DEPTH - 2);
  assign cm_match = cm_valid && (count != '0) && (q[head_q[PTR_W-1:0]].addr == cm_addr);
  assign c1       = q[head_q[PTR_W-1:0] - PTR_W'(1)];
  assign c2       = q[head_q[PTR_W-1:0] - PTR_W'(2)];
  assign c_valid  = ncommit_q == 2'd2;

  logic do_flush;
  assign do_flush = cm_match && cm_is_br_miss_pred;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q    <= '0;
      tail_q    <= '0;
      ncommit_q <= '0;
      upd_pulse <= 1'b0;
    end else begin
      upd_pulse <= cm_match;
      if (cm_match) begin
        head_q <= head_q + 1'b1;
        if (ncommit_q != 2'd2) ncommit_q <= ncommit_q + 1'b1;
      end
      if (do_flush)                tail_q <= head_q + 1'b1;
      else if (enq_valid && !full) tail_q <= tail_q + 1'b1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 count <= (PTR_W+1)'(DEPTH - 2));

  // Entry storage (no reset: only entries between c_2 and u_tail are read).
  always_ff @(posedge clk) begin
    if (enq_valid && !full && !do_flush) begin
      q[tail_q[PTR_W-1:0]] <= '{addr: enq_addr, wf: enq_wf, is_cache_miss: enq_miss,
                                is_call: 1'b0, is_btb_alloc: 1'b0,
                                is_br_miss_pred: 1'b0, is_taken: 1'b0};
    end
    if (cm_match) begin
      q[head_q[PTR_W-1:0]].is_call         <= cm_is_call;
      q[head_q[PTR_W-1:0]].is_btb_alloc    <= cm_is_btb_alloc;
      q[head_q[PTR_W-1:0]].is_br_miss_pred <= cm_is_br_miss_pred;
      q[head_q[PTR_W-1:0]].is_taken        <= cm_is_taken;
    end
  end

endmodule
