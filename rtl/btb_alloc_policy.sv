// btb_alloc_policy: BTB allocation decision at commit.
//
// A committed instruction that is not in the BTB (btb_hit = 0) gets an entry
// under policy
//   TB   only if it is a taken branch,
//   AB   if it is any branch (taken or not),
//   AFA  always (any fetch address).
// Combinational; the policy is a run-time input so one design can be run
// under all three.  The three policies are the document's.
module btb_alloc_policy
  import wfp_pkg::*;
(
  input  alloc_policy_e policy,
  input  logic          valid,
  input  logic          btb_hit,
  input  br_kind_e      kind,
  input  logic          taken,
  output logic          alloc
);

  logic is_branch;
  assign is_branch = kind != K_OTHER;

  always_comb begin
    unique case (policy)
      POL_TB:  alloc = is_branch && taken;
      POL_AB:  alloc = is_branch;
      POL_AFA: alloc = 1'b1;
      default: alloc = is_branch && taken;
    endcase
    alloc = alloc && valid && !btb_hit;
  end

endmodule
