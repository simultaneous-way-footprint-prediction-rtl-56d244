// tb_wf_queue: self-checking test of the way-footprint queue (8 entries,
// so at most 6 uncommitted).  Checks enqueue, address-matched commit with
// the flag write, the c_1 / c_2 shift and the one-cycle-later upd_pulse,
// that a non-matching commit is ignored, the flush on a mispredicted
// commit (including a wrong-path enqueue in the same cycle), and `full`.
module tb_wf_queue;
  import wfp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       enq_valid, enq_miss, full;
  addr_t      enq_addr, cm_addr;
  wf_t        enq_wf;
  logic       cm_valid, cm_is_call, cm_is_btb_alloc, cm_is_br_miss_pred, cm_is_taken, cm_match;
  wfq_entry_t c1, c2;
  logic       c_valid, upd_pulse;
  logic [3:0] count;

  wf_queue #(.DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    enq_valid = 0; cm_valid = 0; cm_is_call = 0; cm_is_btb_alloc = 0;
    cm_is_br_miss_pred = 0; cm_is_taken = 0;
  endtask

  task automatic enq(addr_t a, int w, bit m);
    @(negedge clk); idle();
    enq_valid = 1; enq_addr = a; enq_wf = wf_t'(w); enq_miss = m;
    @(posedge clk); #1 idle();
  endtask

  // commit; returns whether it matched; checks upd_pulse timing
  task automatic commit(addr_t a, bit call, bit alloc, bit mp, bit tk, bit exp_match);
    @(negedge clk); idle();
    cm_valid = 1; cm_addr = a; cm_is_call = call; cm_is_btb_alloc = alloc;
    cm_is_br_miss_pred = mp; cm_is_taken = tk;
    #1 check(cm_match == exp_match, $sformatf("match of commit %h", a));
    @(posedge clk); #1 idle();
    check(upd_pulse == exp_match, "upd_pulse in the cycle after the commit");
    @(posedge clk); #1;
    check(!upd_pulse, "upd_pulse lasts one cycle");
  endtask

  initial begin
    idle(); enq_addr = '0; enq_wf = '0; enq_miss = 0; cm_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    enq(32'h100, 1, 0);
    enq(32'h104, 2, 1);
    enq(32'h200, 3, 0);
    check(count == 3, "three uncommitted");
    commit(32'h104, 0, 0, 0, 0, 0);             // not the head
    commit(32'h100, 0, 1, 0, 1, 1);             // taken, BTB allocated
    check(c1.addr == 32'h100 && c1.wf == 1 && c1.is_taken && c1.is_btb_alloc, "c_1 after first commit");
    check(!c_valid, "one commit: c_2 not valid yet");
    commit(32'h104, 1, 0, 0, 1, 1);             // a call
    check(c_valid, "two commits: c_1 and c_2 valid");
    check(c1.addr == 32'h104 && c1.wf == 2 && c1.is_cache_miss && c1.is_call, "c_1 after second commit");
    check(c2.addr == 32'h100 && c2.is_taken && c2.is_btb_alloc && !c2.is_call, "c_2 after second commit");
    // wrong path behind a mispredicted branch
    enq(32'h300, 0, 0);
    enq(32'h304, 0, 0);
    check(count == 3, "three uncommitted again");
    // mispredicted commit of 0x200 with a wrong-path enqueue in the same cycle
    @(negedge clk); idle();
    cm_valid = 1; cm_addr = 32'h200; cm_is_br_miss_pred = 1; cm_is_taken = 1;
    enq_valid = 1; enq_addr = 32'h308; enq_wf = '0; enq_miss = 0;
    @(posedge clk); #1 idle();
    check(count == 0, "flush empties the uncommitted part");
    check(c1.addr == 32'h200 && c1.is_br_miss_pred && c2.addr == 32'h104, "committed entries kept over the flush");
    // correct path continues
    enq(32'h400, 2, 0);
    commit(32'h400, 0, 0, 0, 0, 1);
    check(c1.addr == 32'h400 && c1.wf == 2 && c2.addr == 32'h200 && c2.is_br_miss_pred, "after flush");
    // full at DEPTH-2 = 6 uncommitted
    for (int i = 0; i < 6; i++) begin
      check(!full, "not full yet");
      enq(32'h500 + 4 * i, 0, 0);
    end
    check(full && count == 6, "full at 6 uncommitted");
    enq(32'h600, 0, 0);                         // dropped
    check(count == 6, "enqueue ignored when full");
    for (int i = 0; i < 6; i++) commit(32'h500 + 4 * i, 0, 0, 0, 0, 1);
    check(count == 0 && c1.addr == 32'h514 && c2.addr == 32'h510, "drained in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
