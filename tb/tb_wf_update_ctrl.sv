// tb_wf_update_ctrl: self-checking test of the WFT / RAS update decision.
// Random pairs of committed entries c_1, c_2 with every combination of
// flags; the expected decision is computed from the update rules:
// WFT write of c_1's footprint at c_2's address (target field if c_2 was
// taken) when c_1 missed or c_2 was mispredicted or newly allocated; RAS
// footprint update for a call in c_2, all-way when the call is the last
// instruction of its 32-byte line.
module tb_wf_update_ctrl;
  import wfp_pkg::*;

  logic       upd_pulse, c_valid;
  wfq_entry_t c1, c2;
  logic       wft_upd, wft_taken, wft_new_entry, ras_upd;
  addr_t      wft_addr, ras_addr;
  wf_t        wft_wf, ras_wf;

  wf_update_ctrl dut (.*);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_wft = 0, n_ras = 0, n_edge = 0;
    for (int n = 0; n < 4000; n++) begin
      bit exp_w, exp_r, last;
      upd_pulse = 1'($urandom_range(0, 3) != 0);
      c_valid   = 1'($urandom_range(0, 7) != 0);
      c1 = '{addr: addr_t'($urandom) & ~32'h3, wf: wf_t'($urandom_range(0, 4)),
             is_cache_miss: 1'($urandom), is_call: 1'($urandom), is_btb_alloc: 1'($urandom),
             is_br_miss_pred: 1'($urandom), is_taken: 1'($urandom)};
      c2 = '{addr: addr_t'($urandom) & ~32'h3, wf: wf_t'($urandom_range(0, 4)),
             is_cache_miss: 1'($urandom), is_call: 1'($urandom), is_btb_alloc: 1'($urandom),
             is_br_miss_pred: 1'($urandom), is_taken: 1'($urandom)};
      if ($urandom_range(0, 3) == 0) c2.addr[4:2] = 3'b111;     // call at a line end
      #1;
      exp_w = upd_pulse && c_valid && (c1.is_cache_miss || c2.is_br_miss_pred || c2.is_btb_alloc);
      exp_r = upd_pulse && c_valid && c2.is_call;
      last  = (c2.addr % 32) == 28;
      check(wft_upd == exp_w, "WFT update condition");
      if (exp_w) begin
        n_wft++;
        check(wft_addr == c2.addr && wft_wf == c1.wf && wft_taken == c2.is_taken
              && wft_new_entry == c2.is_btb_alloc, "WFT update operands");
      end
      check(ras_upd == exp_r, "RAS update condition");
      if (exp_r) begin
        n_ras++;
        if (last) n_edge++;
        check(ras_addr == c2.addr + 4, "RAS update address");
        check(ras_wf == (last ? WF_ALL : c2.wf), "RAS footprint (line boundary rule)");
      end
    end
    check(n_wft > 100 && n_ras > 100 && n_edge > 20, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
