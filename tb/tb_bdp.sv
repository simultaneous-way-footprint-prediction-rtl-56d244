// tb_bdp: self-checking test of the combined direction predictor.
// Small tables (16-entry bimodal and chooser, 4-bit history).  A reference
// model written from the predictor's rules (2-bit counters, chooser trained
// toward the component that alone was right, non-speculative history) is
// compared with the prediction before every update.  Directed parts check
// that an always-taken branch is learned after one update and that a
// strictly alternating branch, which the bimodal table cannot follow, is
// predicted almost perfectly once the chooser has moved to the global table.
module tb_bdp;
  import wfp_pkg::*;

  localparam int BIM = 16, CHO = 16, HW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t pc, upd_pc;
  logic  pred_taken, upd_valid, upd_taken;

  bdp #(.BIM_ENTRIES(BIM), .CHO_ENTRIES(CHO), .HIST_W(HW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rb [BIM], rg [1 << HW], rc [CHO];
  int hist;

  function automatic bit rpred(addr_t a);
    int i;
    i = int'(a >> 2);
    return (rc[i % CHO] >= 2) ? (rg[hist] >= 2) : (rb[i % BIM] >= 2);
  endfunction

  function automatic int bump(int c, bit up);
    return up ? ((c < 3) ? c + 1 : 3) : ((c > 0) ? c - 1 : 0);
  endfunction

  // predict pc, compare with reference, then train with outcome t
  task automatic step(addr_t a, bit t, output bit p);
    int i; bit bp, gp;
    @(negedge clk);
    pc = a; upd_pc = a; upd_taken = t; upd_valid = 1;
    #1;
    p = pred_taken;
    check(pred_taken == rpred(a), $sformatf("prediction for %h", a));
    @(posedge clk); #1 upd_valid = 0;
    i  = int'(a >> 2);
    bp = rb[i % BIM] >= 2;
    gp = rg[hist] >= 2;
    rb[i % BIM] = bump(rb[i % BIM], t);
    rg[hist]    = bump(rg[hist], t);
    if ((bp == t) != (gp == t)) rc[i % CHO] = bump(rc[i % CHO], gp == t);
    hist = ((hist << 1) | int'(t)) & ((1 << HW) - 1);
  endtask

  initial begin
    bit p;
    int right;
    pc = '0; upd_pc = '0; upd_valid = 0; upd_taken = 0;
    foreach (rb[i]) rb[i] = 1;
    foreach (rg[i]) rg[i] = 1;
    foreach (rc[i]) rc[i] = 1;
    hist = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // always taken: weakly-not-taken start, taken after one update
    step(32'h40, 1, p);
    check(p == 0, "initially not taken");
    step(32'h40, 1, p);
    check(p == 1, "learned taken");

    // alternating branch
    right = 0;
    for (int n = 0; n < 200; n++) begin
      step(32'h80, n[0], p);
      if (n >= 100 && p == n[0]) right++;
    end
    check(right >= 95, $sformatf("alternating branch: %0d/100 right", right));

    // random mix against the reference
    for (int n = 0; n < 3000; n++)
      step(addr_t'($urandom_range(0, 63)) << 2, 1'($urandom_range(0, 3) != 0), p);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
