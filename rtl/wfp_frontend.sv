// wfp_frontend: instruction fetch front end with simultaneous branch and
// way-footprint prediction.
//
// Every cycle the fetch address pc_q is looked up in the branch predictor,
// which returns the next fetch address and the way-footprint of that next
// fetch; both are registered and used in the following cycle.  The
// instruction cache is accessed with the footprint of pc_q: one way if the
// footprint names one, all ways otherwise.  Outcomes of an access:
//   hit                  the instruction is delivered (f_valid), the fetch
//                        is recorded in the way-footprint queue with the way
//                        that delivered it, the predictor advances.
//   miss in the one way  the footprint was wrong: the access is repeated
//                        all-way in the next cycle (one lost cycle).
//   miss in all ways     the line is requested (mem_req held with mem_addr
//                        until a one-cycle mem_resp_valid brings the line),
//                        written into the LRU way, and the access repeated
//                        all-way.
// Both misses mark the fetch isCacheMiss in the queue.
//
// The back end reports each committed instruction on `cm`.  A commit trains
// the BTB (allocation per `policy`), the direction predictor and the RAS and
// fills the flags of the queue's head entry.  A committed misprediction
// redirects fetch to cm.next_pc (with an all-way footprint) and flushes the
// uncommitted queue entries.  In the cycle after each commit,
// wf_update_ctrl looks at the last two committed fetches and writes the WFT
// and the RAS footprint.
//
// f_ready low or a full queue hold fetch (no cache access).  `perf` counts
// the events the energy evaluation needs.
// The mechanism follows the document; fetch of one instruction per cycle,
// the one-cycle replay and the refill handshake are this design's choices.
module wfp_frontend
  import wfp_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 2048,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned RAS_DEPTH   = 32,
  parameter int unsigned BIM_ENTRIES = 4096,
  parameter int unsigned CHO_ENTRIES = 4096,
  parameter int unsigned HIST_W      = 12,
  parameter int unsigned IC_SIZE     = 32768,
  parameter int unsigned WFQ_DEPTH   = 128,
  parameter addr_t       RESET_PC    = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  alloc_policy_e           policy,
  // fetched instructions to the back end
  output logic                    f_valid,
  output addr_t                   f_pc,
  output logic [31:0]             f_instr,
  output addr_t                   f_pred_pc,
  input  logic                    f_ready,
  // commit from the back end
  input  commit_t                 cm,
  // line refill from the next memory level
  output logic                    mem_req,
  output addr_t                   mem_addr,
  input  logic                    mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0] mem_resp_line,
  // observation
  output logic [IC_WAYS-1:0]      ic_way_en,
  output perf_t                   perf
);

  typedef enum logic {S_RUN, S_MISS} fstate_e;

  fstate_e state_q;
  addr_t   pc_q, miss_addr_q;
  wf_t     wf_q;
  logic    miss_q;

  // ---------------- blocks ----------------
  logic  redirect, qfull, access;
  logic  ic_hit;
  wf_t   ic_way, fill_way;
  addr_t pred_pc;
  wf_t   pred_wf;
  logic  pred_btb_hit, pred_from_ras;
  logic  fetch_done;
  logic  cm_btb_alloc, cm_match;

  wfq_entry_t c1, c2;
  logic       c_valid, upd_pulse;
  logic       wft_upd, wft_taken, wft_new_entry, wft_written, ras_upd;
  addr_t      wft_addr, ras_addr;
  wf_t        wft_wf, ras_wf;

  assign redirect   = cm.valid && cm.miss_pred;
  assign access     = state_q == S_RUN && f_ready && !qfull && !redirect;
  assign fetch_done = access && ic_hit;

  icache #(.SIZE_BYTES(IC_SIZE)) u_icache (
    .clk, .rst_n,
    .req_valid(access), .req_pc(pc_q), .req_wf(wf_q),
    .hit(ic_hit), .hit_way(ic_way), .instr(f_instr), .way_en(ic_way_en),
    .fill_valid(state_q == S_MISS && mem_resp_valid), .fill_addr(miss_addr_q),
    .fill_line(mem_resp_line), .fill_way
  );

  fetch_predictor #(
    .BTB_ENTRIES(BTB_ENTRIES), .BTB_WAYS(BTB_WAYS), .RAS_DEPTH(RAS_DEPTH),
    .BIM_ENTRIES(BIM_ENTRIES), .CHO_ENTRIES(CHO_ENTRIES), .HIST_W(HIST_W)
  ) u_pred (
    .clk, .rst_n, .policy,
    .lk_pc(pc_q), .advance(fetch_done),
    .pred_pc, .pred_wf, .pred_btb_hit, .pred_from_ras,
    .cm, .cm_btb_alloc,
    .wft_upd, .wft_addr, .wft_taken, .wft_new_entry, .wft_wf, .wft_written,
    .ras_upd, .ras_addr, .ras_wf
  );

  wf_queue #(.DEPTH(WFQ_DEPTH)) u_wfq (
    .clk, .rst_n,
    .enq_valid(fetch_done), .enq_addr(pc_q), .enq_wf(ic_way), .enq_miss(miss_q),
    .full(qfull),
    .cm_valid(cm.valid), .cm_addr(cm.pc), .cm_is_call(cm.kind == K_CALL),
    .cm_is_btb_alloc(cm_btb_alloc), .cm_is_br_miss_pred(cm.miss_pred),
    .cm_is_taken(cm.taken), .cm_match,
    .c1, .c2, .c_valid, .upd_pulse, .count()
  );

  wf_update_ctrl u_upd (
    .upd_pulse, .c_valid, .c1, .c2,
    .wft_upd, .wft_addr, .wft_taken, .wft_new_entry, .wft_wf,
    .ras_upd, .ras_addr, .ras_wf
  );

  // ---------------- fetch control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_RUN;
      pc_q        <= RESET_PC;
      wf_q        <= WF_ALL;
      miss_q      <= 1'b0;
      miss_addr_q <= '0;
    end else begin
      if (redirect) begin
        pc_q   <= cm.next_pc;
        wf_q   <= WF_ALL;
        miss_q <= 1'b0;
      end else if (access) begin
        if (ic_hit) begin
          pc_q   <= pred_pc;
          wf_q   <= pred_wf;
          miss_q <= 1'b0;
        end else if (wf_is_one_way(wf_q)) begin
          wf_q   <= WF_ALL;          // wrong way: repeat all-way
          miss_q <= 1'b1;
        end else begin
          state_q     <= S_MISS;     // cache miss: refill
          miss_addr_q <= {pc_q[ADDR_W-1:$clog2(LINE_BYTES)], {$clog2(LINE_BYTES){1'b0}}};
          miss_q      <= 1'b1;
        end
      end
      if (state_q == S_MISS && mem_resp_valid) state_q <= S_RUN;
    end
  end

  assign mem_req   = state_q == S_MISS;
  assign mem_addr  = miss_addr_q;
  assign f_valid   = fetch_done;
  assign f_pc      = pc_q;
  assign f_pred_pc = pred_pc;

  // Refill handshake: the request and its address stay until the response.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               mem_req && !mem_resp_valid |=> mem_req && $stable(mem_addr));
  // Every commit must find its fetch at the head of the way-footprint queue.
  a_commit_in_order: assert property (@(posedge clk) disable iff (!rst_n)
                                      cm.valid |-> cm_match);

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      if (fetch_done)                          perf.fetches         <= perf.fetches + 1;
      if (access && wf_is_one_way(wf_q))       perf.one_way         <= perf.one_way + 1;
      if (access && !wf_is_one_way(wf_q))      perf.all_way         <= perf.all_way + 1;
      if (fetch_done)                          perf.wft_reads       <= perf.wft_reads + 1;
      if (access && !ic_hit && wf_is_one_way(wf_q))
                                               perf.way_replays     <= perf.way_replays + 1;
      if (state_q == S_MISS && mem_resp_valid) perf.cache_misses    <= perf.cache_misses + 1;
      if (cm_btb_alloc)                        perf.btb_allocs      <= perf.btb_allocs + 1;
      if (wft_written)                         perf.wft_updates     <= perf.wft_updates + 1;
      if (ras_upd)                             perf.ras_wf_updates  <= perf.ras_wf_updates + 1;
      if (fetch_done && pred_from_ras)         perf.ras_predictions <= perf.ras_predictions + 1;
      if (redirect)                            perf.flushes         <= perf.flushes + 1;
      if (state_q == S_RUN && !redirect && (!f_ready || qfull))
                                               perf.stall_cycles    <= perf.stall_cycles + 1;
    end
  end

endmodule
