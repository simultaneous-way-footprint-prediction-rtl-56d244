// wft: way-footprint table.
//
// Same number of ways and sets as the BTB, so that BTB entry (w, s) and WFT
// entry (w, s) belong to the same fetch address.  Each entry holds two
// way-footprints: the one for the branch target and the one for the
// fall-through address.  There is no tag: the BTB tag compare stands for it.
//
// Read (combinational): the set of the current fetch address is read in
// parallel with the BTB; once the BTB names the hit way (rd_way), the entry of
// that way is selected and, by the predicted direction rd_taken, one of its
// two fields is returned as rd_wf.
// Write (next clock edge): field "target" (wr_taken = 1) or "fall-through"
// (wr_taken = 0) of entry (wr_way, wr_set) takes wr_wf.  With wr_clear_other
// the other field is set to all-way: used when the entry has just been
// allocated for a new address, so that the previous owner's footprint is not
// reused (a choice of this design).
// Reset sets every field to all-way.
module wft
  import wfp_pkg::*;
#(
  parameter int unsigned SETS  = 512,
  parameter int unsigned WAYS  = 4,
  localparam int unsigned SET_W = $clog2(SETS),
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SET_W-1:0] rd_set,
  input  logic [WAY_W-1:0] rd_way,
  input  logic             rd_taken,
  output wf_t              rd_wf,
  input  logic             we,
  input  logic [SET_W-1:0] wr_set,
  input  logic [WAY_W-1:0] wr_way,
  input  logic             wr_taken,
  input  logic             wr_clear_other,
  input  wf_t              wr_wf
);

  wf_t tgt_wf_q [SETS][WAYS];
  wf_t ft_wf_q  [SETS][WAYS];

  always_comb begin
    rd_wf = rd_taken ? tgt_wf_q[rd_set][rd_way] : ft_wf_q[rd_set][rd_way];
    if (!wf_is_one_way(rd_wf)) rd_wf = WF_ALL;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          tgt_wf_q[s][w] <= WF_ALL;
          ft_wf_q[s][w]  <= WF_ALL;
        end
      end
    end else if (we) begin
      if (wr_taken) begin
        tgt_wf_q[wr_set][wr_way] <= wr_wf;
        if (wr_clear_other) ft_wf_q[wr_set][wr_way] <= WF_ALL;
      end else begin
        ft_wf_q[wr_set][wr_way] <= wr_wf;
        if (wr_clear_other) tgt_wf_q[wr_set][wr_way] <= WF_ALL;
      end
    end
  end

endmodule
