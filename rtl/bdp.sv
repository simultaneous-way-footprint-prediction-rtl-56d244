// bdp: combined branch direction predictor.
//
// Three tables of 2-bit saturating counters:
//   bimodal  BIM_ENTRIES counters indexed by the fetch address,
//   global   2^HIST_W counters indexed by a HIST_W-bit global history,
//   chooser  CHO_ENTRIES counters indexed by the fetch address; a value of 2
//            or more selects the global prediction, less selects bimodal.
// A counter predicts taken at 2 or more.
//
// Lookup is combinational (pc -> pred_taken).  Update happens at the clock
// edge for a committed conditional branch (upd_valid): both component
// counters move toward the outcome, the chooser moves toward the component
// that was right when exactly one of them was, and the outcome is shifted
// into the global history.  History and counters are therefore
// non-speculative.
//
// Table sizes follow the document (4K bimodal, 4K chooser, 12-bit history
// with 4K entries).  Indexing, initial counter values (weakly not taken,
// weakly bimodal) and commit-time update are this design's choices.
module bdp
  import wfp_pkg::*;
#(
  parameter int unsigned BIM_ENTRIES = 4096,
  parameter int unsigned CHO_ENTRIES = 4096,
  parameter int unsigned HIST_W      = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t pc,
  output logic  pred_taken,
  input  logic  upd_valid,
  input  addr_t upd_pc,
  input  logic  upd_taken
);

  localparam int unsigned GLB_ENTRIES = 1 << HIST_W;
  localparam int unsigned BIM_W = $clog2(BIM_ENTRIES);
  localparam int unsigned CHO_W = $clog2(CHO_ENTRIES);

  logic [1:0]        bim_q [BIM_ENTRIES];
  logic [1:0]        glb_q [GLB_ENTRIES];
  logic [1:0]        cho_q [CHO_ENTRIES];
  logic [HIST_W-1:0] ghr_q;

  function automatic logic [1:0] sat(logic [1:0] c, logic up);
    if (up) return (c == 2'd3) ? c : c + 2'd1;
    else    return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  logic bim_p, glb_p;
  always_comb begin
    bim_p      = bim_q[pc[2 +: BIM_W]][1];
    glb_p      = glb_q[ghr_q][1];
    pred_taken = cho_q[pc[2 +: CHO_W]][1] ? glb_p : bim_p;
  end

  logic [BIM_W-1:0] ub;
  logic [CHO_W-1:0] uc;
  logic             ub_p, ug_p;
  always_comb begin
    ub   = upd_pc[2 +: BIM_W];
    uc   = upd_pc[2 +: CHO_W];
    ub_p = bim_q[ub][1];
    ug_p = glb_q[ghr_q][1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BIM_ENTRIES; i++) bim_q[i] <= 2'd1;
      for (int i = 0; i < GLB_ENTRIES; i++) glb_q[i] <= 2'd1;
      for (int i = 0; i < CHO_ENTRIES; i++) cho_q[i] <= 2'd1;
      ghr_q <= '0;
    end else if (upd_valid) begin
      bim_q[ub]    <= sat(bim_q[ub], upd_taken);
      glb_q[ghr_q] <= sat(glb_q[ghr_q], upd_taken);
      if ((ub_p == upd_taken) != (ug_p == upd_taken))
        cho_q[uc] <= sat(cho_q[uc], ug_p == upd_taken);
      ghr_q <= {ghr_q[HIST_W-2:0], upd_taken};
    end
  end

endmodule
