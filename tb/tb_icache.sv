// tb_icache: self-checking test of the way-selective instruction cache.
// A 256-byte cache (2 sets x 4 ways x 32-byte lines).  Directed part: fills
// go to invalid ways first, all-way and one-way accesses hit with the right
// word, a one-way access to the wrong way misses and enables only that
// bank, and the least recently used way is replaced.  Random part: a
// reference (line address, last use per way) decides hit, way and data of
// every access; misses are refilled as a fetch unit would.
module tb_icache;
  import wfp_pkg::*;

  localparam int SETS = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid, hit, fill_valid;
  addr_t        req_pc, fill_addr;
  wf_t          req_wf, hit_way, fill_way;
  logic [31:0]  instr;
  logic [3:0]   way_en;
  logic [255:0] fill_line;

  icache #(.SIZE_BYTES(256)) dut (.*);

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

  function automatic logic [31:0] word_of(addr_t a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction
  function automatic logic [255:0] line_of(addr_t a);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = word_of({a[31:5], 5'(i * 4)});
    return l;
  endfunction

  task automatic fill(addr_t a, int exp_way);
    @(negedge clk);
    req_valid = 0; fill_valid = 1; fill_addr = {a[31:5], 5'b0}; fill_line = line_of(a);
    #1 if (exp_way >= 0) check(fill_way == wf_t'(exp_way), $sformatf("fill way of %h = %0d exp %0d", a, fill_way, exp_way));
    @(posedge clk); #1 fill_valid = 0;
  endtask

  task automatic access(addr_t a, wf_t wf, bit exp_hit, int exp_way);
    @(negedge clk);
    fill_valid = 0; req_valid = 1; req_pc = a; req_wf = wf;
    #1;
    check(hit == exp_hit, $sformatf("hit of %h wf %0d = %0d", a, wf, hit));
    if (exp_hit) check(hit_way == wf_t'(exp_way) && instr == word_of(a), $sformatf("way/data of %h", a));
    if (wf_is_one_way(wf)) check(way_en == 4'(1 << wf), "one bank enabled");
    else                   check(way_en == 4'hF, "all banks enabled");
    @(posedge clk); #1 req_valid = 0;
  endtask

  // reference
  addr_t rline [SETS][4];
  bit    rv    [SETS][4];
  int    rlast [SETS][4];
  int    now = 0;

  initial begin
    req_valid = 0; fill_valid = 0; req_pc = '0; req_wf = WF_ALL; fill_addr = '0; fill_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(32'h008, WF_ALL, 0, 0);
    fill(32'h000, 0);
    access(32'h008, WF_ALL, 1, 0);
    access(32'h01C, wf_t'(0), 1, 0);
    access(32'h01C, wf_t'(1), 0, 0);             // wrong way: miss
    fill(32'h040, 1); fill(32'h080, 2); fill(32'h0C0, 3);
    access(32'h044, wf_t'(1), 1, 1);
    access(32'h004, WF_ALL, 1, 0);
    // use order so far: w0, w1, w2, w3 (fills), w1 (0x044), w0 (0x004)
    fill(32'h100, 2);                            // LRU is way 2
    access(32'h080, WF_ALL, 0, 0);
    access(32'h104, wf_t'(2), 1, 2);

    // random phase from a fresh reset
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < 4; w++) begin rv[s][w] = 0; rlast[s][w] = 0; end
    for (int n = 0; n < 3000; n++) begin
      addr_t a;
      int s, hw, vw, oldest;
      bit h;
      wf_t wf;
      a = (addr_t'($urandom_range(0, 11)) << 5) | (addr_t'($urandom_range(0, 7)) << 2);
      s = int'(a[5]);
      h = 0; hw = 0;
      for (int w = 0; w < 4; w++) if (rv[s][w] && rline[s][w] == {a[31:5], 5'b0}) begin h = 1; hw = w; end
      case ($urandom_range(0, 2))
        0: wf = WF_ALL;
        1: wf = wf_t'(hw);
        default: wf = wf_t'($urandom_range(0, 3));
      endcase
      now++;
      access(a, wf, h && (!wf_is_one_way(wf) || wf == wf_t'(hw)), hw);
      if (h && (!wf_is_one_way(wf) || wf == wf_t'(hw))) rlast[s][hw] = now;
      if (!h) begin
        vw = -1; oldest = 1 << 30;
        for (int w = 0; w < 4; w++) if (!rv[s][w] && vw < 0) vw = w;
        if (vw < 0) for (int w = 0; w < 4; w++) if (rlast[s][w] < oldest) begin oldest = rlast[s][w]; vw = w; end
        now++;
        fill(a, vw);
        rv[s][vw] = 1; rline[s][vw] = {a[31:5], 5'b0}; rlast[s][vw] = now;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
