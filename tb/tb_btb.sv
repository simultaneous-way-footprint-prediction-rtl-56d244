// tb_btb: self-checking test of the branch target buffer.
// A 16-entry 4-way buffer (4 sets) is filled, probed, updated and made to
// evict.  Expected ways follow from LRU order worked out by hand: fills go
// to invalid ways 0..3 first, the least recently used way is replaced next.
// A random phase compares every lookup with a behavioural reference that
// keeps (tag, target, kind, last-use time) per entry.
module tb_btb;
  import wfp_pkg::*;

  localparam int unsigned ENTRIES = 16, WAYS = 4, SETS = ENTRIES / WAYS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  addr_t    lk_pc;
  logic     lk_touch, lk_hit;
  logic [1:0] lk_way, wr_way, alloc_way;
  addr_t    lk_target;
  br_kind_e lk_kind, wr_kind;
  addr_t    pr_pc [2];
  logic     pr_hit [2];
  logic [1:0] pr_way [2];
  logic     wr_alloc, wr_update;
  addr_t    wr_pc, wr_target;

  btb #(.ENTRIES(ENTRIES), .WAYS(WAYS), .NPROBE(2)) dut (.*);

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

  task automatic idle();
    lk_touch = 0; wr_alloc = 0; wr_update = 0;
  endtask

  task automatic alloc(addr_t pc, addr_t tgt, br_kind_e k, int exp_way);
    @(negedge clk);
    idle();
    wr_pc = pc; wr_target = tgt; wr_kind = k; wr_alloc = 1;
    #1 if (exp_way >= 0) check(alloc_way == 2'(exp_way), $sformatf("alloc way of %h: %0d exp %0d", pc, alloc_way, exp_way));
    @(posedge clk); #1 wr_alloc = 0;
  endtask

  task automatic look(addr_t pc, bit touch, bit exp_hit, int exp_way, addr_t exp_tgt);
    @(negedge clk);
    idle();
    lk_pc = pc; lk_touch = touch;
    #1;
    check(lk_hit == exp_hit, $sformatf("hit of %h = %0d", pc, lk_hit));
    if (exp_hit) begin
      check(lk_way == 2'(exp_way), $sformatf("way of %h = %0d exp %0d", pc, lk_way, exp_way));
      check(lk_target == exp_tgt, $sformatf("target of %h = %h", pc, lk_target));
    end
    @(posedge clk); #1 lk_touch = 0;
  endtask

  // reference for the random phase
  typedef struct { bit v; addr_t pc; addr_t tgt; int last; } ref_t;
  ref_t rf [SETS][WAYS];
  int   now = 0;

  initial begin
    idle();
    lk_pc = '0; wr_pc = '0; wr_target = '0; wr_kind = K_OTHER; wr_way = '0;
    pr_pc[0] = '0; pr_pc[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // set 0 holds addresses 0x00, 0x10, 0x20, ...
    look(32'h0000_0010, 0, 0, 0, '0);
    for (int i = 0; i < 4; i++) alloc(32'h10 * i, 32'h1000 + i, K_JUMP, i);
    for (int i = 0; i < 4; i++) look(32'h10 * i, 0, 1, i, 32'h1000 + i);
    look(32'h0, 1, 1, 0, 32'h1000);                  // way 0 becomes MRU
    alloc(32'h40, 32'h1004, K_CALL, 1);              // way 1 is now LRU
    look(32'h10, 0, 0, 0, '0);
    look(32'h40, 0, 1, 1, 32'h1004);
    look(32'h0,  0, 1, 0, 32'h1000);

    // probes
    @(negedge clk);
    pr_pc[0] = 32'h30; pr_pc[1] = 32'h10;
    #1 check(pr_hit[0] && pr_way[0] == 2'd3, "probe 0x30");
    check(!pr_hit[1], "probe 0x10 misses");

    // target/kind update of an existing entry
    @(negedge clk);
    wr_pc = 32'h20; wr_way = 2'd2; wr_target = 32'h2222; wr_kind = K_COND; wr_update = 1;
    @(posedge clk); #1 wr_update = 0;
    @(negedge clk); lk_pc = 32'h20; #1;
    check(lk_hit && lk_target == 32'h2222 && lk_kind == K_COND, "updated entry");

    // another set starts with invalid ways
    look(32'h4, 0, 0, 0, '0);
    alloc(32'h4, 32'h3000, K_RET, 0);
    look(32'h4, 0, 1, 0, 32'h3000);

    // random phase against the reference (fresh reset)
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) rf[s][w] = '{0, '0, '0, -w};
    for (int n = 0; n < 3000; n++) begin
      addr_t pc;
      int s, hw, vw, oldest;
      bit h;
      pc = (addr_t'($urandom_range(0, 5)) << 4) | (addr_t'($urandom_range(0, 3)) << 2);
      s  = int'(pc[3:2]);
      h = 0; hw = 0;
      for (int w = 0; w < WAYS; w++) if (rf[s][w].v && rf[s][w].pc == pc) begin h = 1; hw = w; end
      now++;
      if ($urandom_range(0, 1) == 0 || h) begin
        look(pc, 1, h, hw, h ? rf[s][hw].tgt : '0);
        if (h) rf[s][hw].last = now;
      end else begin
        // victim: first invalid way, else least recently used
        vw = -1; oldest = 1 << 30;
        for (int w = 0; w < WAYS; w++) if (!rf[s][w].v && vw < 0) vw = w;
        if (vw < 0) for (int w = 0; w < WAYS; w++) if (rf[s][w].last < oldest) begin oldest = rf[s][w].last; vw = w; end
        alloc(pc, pc ^ 32'hABC0, K_JUMP, vw);
        rf[s][vw] = '{1, pc, pc ^ 32'hABC0, now};
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
