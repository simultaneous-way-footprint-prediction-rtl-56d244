// tb_ras: self-checking test of the return address stack with footprints.
// A 4-entry stack: pushes start with an all-way footprint, a footprint
// update finds its entry by return address, pops expose older entries,
// overflow wraps, and a misprediction returns the pointer to the committed
// one (pushing the return address of a mispredicted call).
module tb_ras;
  import wfp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  push, pop, upd_valid, cm_push, cm_pop, recover;
  addr_t push_addr, top_addr, upd_addr, cm_ret_addr;
  wf_t   top_wf, upd_wf;

  ras #(.DEPTH(4)) dut (.*);

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
    push = 0; pop = 0; upd_valid = 0; cm_push = 0; cm_pop = 0; recover = 0;
  endtask

  task automatic op_push(addr_t a);
    @(negedge clk); idle(); push = 1; push_addr = a; @(posedge clk); #1 idle();
  endtask
  task automatic op_pop();
    @(negedge clk); idle(); pop = 1; @(posedge clk); #1 idle();
  endtask
  task automatic op_upd(addr_t a, wf_t w);
    @(negedge clk); idle(); upd_valid = 1; upd_addr = a; upd_wf = w; @(posedge clk); #1 idle();
  endtask
  task automatic expect_top(addr_t a, wf_t w, string msg);
    @(negedge clk); #1;
    check(top_addr == a && top_wf == w, $sformatf("%s: top %h/%0d exp %h/%0d", msg, top_addr, top_wf, a, w));
  endtask

  initial begin
    idle(); push_addr = '0; upd_addr = '0; upd_wf = '0; cm_ret_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    op_push(32'h104);
    expect_top(32'h104, WF_ALL, "first push");
    op_push(32'h208);
    expect_top(32'h208, WF_ALL, "second push");
    op_upd(32'h104, wf_t'(2));                   // below the top
    expect_top(32'h208, WF_ALL, "update of lower entry leaves top");
    op_upd(32'h208, wf_t'(1));
    expect_top(32'h208, wf_t'(1), "update of top");
    op_upd(32'h999, wf_t'(3));                   // no match
    expect_top(32'h208, wf_t'(1), "unmatched update");
    op_pop();
    expect_top(32'h104, wf_t'(2), "after pop");
    op_pop();
    // overflow: 5 pushes on a 4-deep stack keep the last 4
    for (int i = 1; i <= 5; i++) op_push(32'h1000 * i);
    for (int i = 5; i >= 2; i--) begin
      expect_top(32'h1000 * i, WF_ALL, "overflow order");
      op_pop();
    end
    expect_top(32'h5000, WF_ALL, "wrapped");

    // recovery: committed pointer from reset = 0, then one committed call
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    op_push(32'h40);                              // correct-path call
    @(negedge clk); idle(); cm_push = 1; cm_ret_addr = 32'h40; @(posedge clk); #1 idle();
    op_push(32'h80);                              // wrong-path call
    op_push(32'hC0);
    expect_top(32'hC0, WF_ALL, "wrong path pushed");
    @(negedge clk); idle(); recover = 1; @(posedge clk); #1 idle();
    expect_top(32'h40, WF_ALL, "recovered to committed top");
    // mispredicted call (never pushed at fetch) pushes its return on recovery
    @(negedge clk); idle(); recover = 1; cm_push = 1; cm_ret_addr = 32'h300;
    @(posedge clk); #1 idle();
    expect_top(32'h300, WF_ALL, "mispredicted call pushed on recovery");
    op_pop();
    expect_top(32'h40, WF_ALL, "below it the earlier call");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
