// fetch_predictor: next-fetch-address and way-footprint prediction.
//
// The branch predictor (BTB, direction predictor, return address stack) is
// extended so that, from the current fetch address alone, it predicts both
// the next fetch address and the way-footprint of that next fetch:
//   BTB miss              next = pc + 4,     footprint all-way
//   hit, conditional      direction from the BDP; next = target or pc + 4,
//                         footprint = WFT target / fall-through field
//   hit, jump or call     next = target, WFT target field (a call also
//                         pushes pc + 4 on the RAS)
//   hit, return           next and footprint from the RAS top (popped)
//   hit, other (AFA)      next = stored target (= pc + 4), WFT fall-through
// The BTB and the WFT are read in parallel with the same set index; the BTB
// hit way selects the WFT entry.  Lookup is combinational; `advance` (the
// fetch of lk_pc is really done this cycle) commits the RAS push/pop and the
// BTB LRU update.
//
// Commit side (cm, same cycle as the back end reports it): the BTB is probed
// for cm.pc; a missing instruction is allocated per `policy`
// (btb_alloc_policy) with target = actual target if taken, else pc + 4; a
// hit on a taken branch refreshes the target.  Conditional branches that
// have (or now get) a BTB entry train the BDP and its history.  A misprediction restores the RAS pointer.  cm_btb_alloc goes to
// the way-footprint queue as isBTBalloc.
// Update side (from wf_update_ctrl): the WFT entry of wft_addr is located by
// a second BTB probe and written; the RAS footprint update is passed on.
module fetch_predictor
  import wfp_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 2048,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned RAS_DEPTH   = 32,
  parameter int unsigned BIM_ENTRIES = 4096,
  parameter int unsigned CHO_ENTRIES = 4096,
  parameter int unsigned HIST_W      = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  alloc_policy_e policy,
  // prediction
  input  addr_t         lk_pc,
  input  logic          advance,
  output addr_t         pred_pc,
  output wf_t           pred_wf,
  output logic          pred_btb_hit,
  output logic          pred_from_ras,
  // commit
  input  commit_t       cm,
  output logic          cm_btb_alloc,
  // way-footprint updates
  input  logic          wft_upd,
  input  addr_t         wft_addr,
  input  logic          wft_taken,
  input  logic          wft_new_entry,
  input  wf_t           wft_wf,
  output logic          wft_written,
  input  logic          ras_upd,
  input  addr_t         ras_addr,
  input  wf_t           ras_wf
);

  localparam int unsigned SETS  = BTB_ENTRIES / BTB_WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (BTB_WAYS > 1) ? $clog2(BTB_WAYS) : 1;

  // ---------------- BTB ----------------
  logic             lk_hit;
  logic [WAY_W-1:0] lk_way;
  addr_t            lk_target;
  br_kind_e         lk_kind;
  addr_t            pr_pc  [2];
  logic             pr_hit [2];
  logic [WAY_W-1:0] pr_way [2];
  logic             btb_alloc, btb_update;
  logic [WAY_W-1:0] alloc_way;

  assign pr_pc[0] = cm.pc;
  assign pr_pc[1] = wft_addr;

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS), .NPROBE(2)) u_btb (
    .clk, .rst_n,
    .lk_pc(lk_pc), .lk_touch(advance), .lk_hit, .lk_way, .lk_target, .lk_kind,
    .pr_pc, .pr_hit, .pr_way,
    .wr_alloc(btb_alloc), .wr_update(btb_update), .wr_way(pr_way[0]),
    .wr_pc(cm.pc),
    .wr_target(cm.taken ? cm.next_pc : cm.pc + addr_t'(INSTR_BYTES)),
    .wr_kind(cm.kind), .alloc_way
  );

  btb_alloc_policy u_policy (
    .policy, .valid(cm.valid), .btb_hit(pr_hit[0]), .kind(cm.kind),
    .taken(cm.taken), .alloc(btb_alloc)
  );

  assign cm_btb_alloc = btb_alloc;
  assign btb_update   = cm.valid && pr_hit[0] && cm.taken && cm.kind != K_RET;

  // ---------------- BDP ----------------
  logic bdp_taken;
  bdp #(.BIM_ENTRIES(BIM_ENTRIES), .CHO_ENTRIES(CHO_ENTRIES), .HIST_W(HIST_W)) u_bdp (
    .clk, .rst_n, .pc(lk_pc), .pred_taken(bdp_taken),
    .upd_valid(cm.valid && cm.kind == K_COND && (pr_hit[0] || btb_alloc)),
    .upd_pc(cm.pc), .upd_taken(cm.taken)
  );

  // ---------------- WFT ----------------
  logic use_target;
  wf_t  wft_rd;
  assign wft_written = wft_upd && pr_hit[1];

  wft #(.SETS(SETS), .WAYS(BTB_WAYS)) u_wft (
    .clk, .rst_n,
    .rd_set(lk_pc[2 +: SET_W]), .rd_way(lk_way), .rd_taken(use_target), .rd_wf(wft_rd),
    .we(wft_written), .wr_set(wft_addr[2 +: SET_W]), .wr_way(pr_way[1]),
    .wr_taken(wft_taken), .wr_clear_other(wft_new_entry), .wr_wf(wft_wf)
  );

  // ---------------- RAS ----------------
  addr_t ras_top;
  wf_t   ras_top_wf;
  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push(advance && lk_hit && lk_kind == K_CALL), .push_addr(lk_pc + addr_t'(INSTR_BYTES)),
    .pop(advance && lk_hit && lk_kind == K_RET),
    .top_addr(ras_top), .top_wf(ras_top_wf),
    .upd_valid(ras_upd), .upd_addr(ras_addr), .upd_wf(ras_wf),
    .cm_push(cm.valid && cm.kind == K_CALL), .cm_pop(cm.valid && cm.kind == K_RET),
    .cm_ret_addr(cm.pc + addr_t'(INSTR_BYTES)),
    .recover(cm.valid && cm.miss_pred)
  );

  // ---------------- next fetch ----------------
  // Direction: decides target or fall-through (and which WFT field).
  always_comb begin
    use_target    = 1'b0;
    pred_from_ras = 1'b0;
    if (lk_hit) begin
      unique case (lk_kind)
        K_COND:         use_target = bdp_taken;
        K_JUMP, K_CALL: use_target = 1'b1;
        K_RET:          pred_from_ras = 1'b1;
        default:        use_target = 1'b0;
      endcase
    end
  end

  always_comb begin
    pred_pc = lk_pc + addr_t'(INSTR_BYTES);
    pred_wf = WF_ALL;
    if (lk_hit) begin
      if (pred_from_ras) begin
        pred_pc = ras_top;
        pred_wf = ras_top_wf;
      end else begin
        pred_pc = (use_target || lk_kind == K_OTHER) ? lk_target : lk_pc + addr_t'(INSTR_BYTES);
        pred_wf = wft_rd;
      end
    end
    pred_btb_hit = lk_hit;
  end

endmodule
