// tb_fetch_predictor: self-checking test of next-address and way-footprint
// prediction (16-entry BTB, 4-entry RAS, small direction tables).
// Follows a short history of commits and updates and checks each
// prediction: default pc+4 / all-way on a BTB miss, allocation per policy,
// WFT footprints for the target and fall-through paths selected by the
// predicted direction, jump target refresh, and returns predicted from the
// RAS top with the footprint written by a RAS update.
module tb_fetch_predictor;
  import wfp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  alloc_policy_e policy;
  addr_t   lk_pc, pred_pc, wft_addr, ras_addr;
  logic    advance, pred_btb_hit, pred_from_ras, cm_btb_alloc;
  wf_t     pred_wf, wft_wf, ras_wf;
  commit_t cm;
  logic    wft_upd, wft_taken, wft_new_entry, wft_written, ras_upd;

  fetch_predictor #(.BTB_ENTRIES(16), .BTB_WAYS(4), .RAS_DEPTH(4),
                    .BIM_ENTRIES(16), .CHO_ENTRIES(16), .HIST_W(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    advance = 0; cm = '0; wft_upd = 0; ras_upd = 0;
  endtask

  task automatic predict(addr_t pc, bit adv, bit exp_hit, addr_t exp_pc, wf_t exp_wf, string msg);
    @(negedge clk); idle();
    lk_pc = pc; advance = adv;
    #1;
    check(pred_btb_hit == exp_hit && pred_pc == exp_pc && pred_wf == exp_wf,
          $sformatf("%s: hit %0d next %h wf %0d (exp %0d %h %0d)", msg, pred_btb_hit, pred_pc, pred_wf,
                    exp_hit, exp_pc, exp_wf));
    @(posedge clk); #1 idle();
  endtask

  task automatic commit(addr_t pc, br_kind_e k, bit tk, addr_t nxt, bit mp, bit exp_alloc);
    @(negedge clk); idle();
    cm = '{valid: 1'b1, pc: pc, kind: k, taken: tk, next_pc: nxt, miss_pred: mp};
    #1 check(cm_btb_alloc == exp_alloc, $sformatf("allocation for %h under policy %s", pc, policy.name()));
    @(posedge clk); #1 idle();
  endtask

  task automatic wft_write(addr_t a, bit tk, bit new_e, wf_t w, bit exp_written);
    @(negedge clk); idle();
    wft_upd = 1; wft_addr = a; wft_taken = tk; wft_new_entry = new_e; wft_wf = w;
    #1 check(wft_written == exp_written, $sformatf("WFT write for %h", a));
    @(posedge clk); #1 idle();
  endtask

  initial begin
    bit done;
    idle(); lk_pc = '0; wft_addr = '0; wft_taken = 0; wft_new_entry = 0; wft_wf = '0;
    ras_addr = '0; ras_wf = '0; policy = POL_TB;
    repeat (2) @(posedge clk);
    rst_n = 1;

    predict(32'h100, 0, 0, 32'h104, WF_ALL, "cold miss");
    commit(32'h100, K_OTHER, 0, 32'h104, 0, 0);          // TB: no entry for a non-branch
    policy = POL_AFA;
    commit(32'h100, K_OTHER, 0, 32'h104, 0, 1);          // AFA: entry
    predict(32'h100, 0, 1, 32'h104, WF_ALL, "AFA entry");
    wft_write(32'h100, 0, 1, wf_t'(2), 1);
    predict(32'h100, 0, 1, 32'h104, wf_t'(2), "fall-through footprint");
    wft_write(32'h800, 0, 0, wf_t'(1), 0);               // not in the BTB: no write

    policy = POL_TB;
    commit(32'h200, K_JUMP, 1, 32'h400, 1, 1);
    predict(32'h200, 0, 1, 32'h400, WF_ALL, "jump, no footprint yet");
    wft_write(32'h200, 1, 1, wf_t'(3), 1);
    predict(32'h200, 0, 1, 32'h400, wf_t'(3), "jump target footprint");
    commit(32'h200, K_JUMP, 1, 32'h480, 1, 0);           // new target refreshes the entry
    predict(32'h200, 0, 1, 32'h480, wf_t'(3), "refreshed target");

    // call 0x300 -> 0x600, mispredicted (not in BTB): return address pushed on recovery
    commit(32'h300, K_CALL, 1, 32'h600, 1, 1);
    // return 0x700 -> 0x304, mispredicted: entry allocated, stack popped
    commit(32'h700, K_RET, 1, 32'h304, 1, 1);
    // second call instance is predicted and pushes 0x304 with an all-way footprint
    predict(32'h300, 1, 1, 32'h600, WF_ALL, "call predicted");
    predict(32'h700, 0, 1, 32'h304, WF_ALL, "return from RAS");
    @(negedge clk); idle(); ras_upd = 1; ras_addr = 32'h304; ras_wf = wf_t'(1);
    @(posedge clk); #1 idle();
    @(negedge clk); lk_pc = 32'h700; #1;
    check(pred_from_ras && pred_pc == 32'h304 && pred_wf == wf_t'(1), "return footprint from RAS");

    // conditional 0x500 -> 0x540
    commit(32'h500, K_COND, 1, 32'h540, 1, 1);
    wft_write(32'h500, 1, 1, wf_t'(0), 1);
    wft_write(32'h500, 0, 0, wf_t'(3), 1);
    predict(32'h500, 0, 1, 32'h540, wf_t'(0), "cond learned taken, target footprint");
    done = 0;
    for (int i = 0; i < 10 && !done; i++) begin
      commit(32'h500, K_COND, 0, 32'h504, 0, 0);
      @(negedge clk); lk_pc = 32'h500; #1;
      if (pred_pc == 32'h504) done = 1;
    end
    check(done, "cond learned not taken");
    predict(32'h500, 0, 1, 32'h504, wf_t'(3), "not taken, fall-through footprint");

    // AB allocates untaken branches with target pc+4, TB does not
    policy = POL_AB;
    commit(32'h900, K_COND, 0, 32'h904, 0, 1);
    policy = POL_TB;
    commit(32'hA00, K_COND, 0, 32'hA04, 0, 0);
    @(negedge clk); lk_pc = 32'h900; #1;
    check(pred_btb_hit && pred_pc == 32'h904, "AB entry predicts next continuous address");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
