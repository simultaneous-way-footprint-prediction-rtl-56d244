// wf_update_ctrl: decides the WFT and RAS way-footprint updates.
//
// Runs in the cycle after a commit (upd_pulse), when c_1 is the fetch just
// committed and c_2 the fetch before it.  The way-footprint that c_1's fetch
// used is what should be predicted for the fetch after c_2, so:
//   WFT update when c_1.isCacheMiss (its footprint may have changed),
//   c_2.isBrMissPred (a different path may follow) or c_2.isBTBalloc (a new
//   BTB entry needs its footprint).  Address c_2.addr, footprint c_1.wf,
//   field "target" if c_2.isTaken else "fall-through".  wft_new_entry
//   (= c_2.isBTBalloc) lets the WFT reset the other field.
//   RAS update when c_2.isCall: the return address c_2.addr + 4 gets the
//   call's own footprint c_2.wf if the return address lies in the same cache
//   line as the call, otherwise all-way.
// Purely combinational.  Conditions and operands follow the document.
module wf_update_ctrl
  import wfp_pkg::*;
(
  input  logic       upd_pulse,
  input  logic       c_valid,
  input  wfq_entry_t c1,
  input  wfq_entry_t c2,
  output logic       wft_upd,
  output addr_t      wft_addr,
  output logic       wft_taken,
  output logic       wft_new_entry,
  output wf_t        wft_wf,
  output logic       ras_upd,
  output addr_t      ras_addr,
  output wf_t        ras_wf
);

  localparam int unsigned OFS_W = $clog2(LINE_BYTES);

  logic active;
  assign active = upd_pulse && c_valid;

  assign wft_upd       = active && (c1.is_cache_miss || c2.is_br_miss_pred || c2.is_btb_alloc);
  assign wft_addr      = c2.addr;
  assign wft_taken     = c2.is_taken;
  assign wft_new_entry = c2.is_btb_alloc;
  assign wft_wf        = c1.wf;

  assign ras_upd  = active && c2.is_call;
  assign ras_addr = c2.addr + addr_t'(INSTR_BYTES);
  // The call is on a line boundary when it is the last instruction of its line.
  assign ras_wf   = (c2.addr[OFS_W-1:0] == OFS_W'(LINE_BYTES - INSTR_BYTES)) ? WF_ALL : c2.wf;

endmodule
