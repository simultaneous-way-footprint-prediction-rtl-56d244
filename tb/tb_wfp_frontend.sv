// tb_wfp_frontend: end-to-end test of the front end at its default sizes
// (2K-entry 4-way BTB, 32 KB 4-way instruction cache, 32-entry RAS).
//
// The testbench provides what the front end talks to:
//   * a program generated at start: a main loop calling 13 hot functions
//     (about 6 KB) and 6 cold ones placed 8 KB apart, which evict lines of
//     the hot code on every pass.  Functions contain forward branches, loop
//     branches, jumps, nested calls and a final return.  Instruction word format (this
//     testbench's own): [31:29] kind (0 other, 1 conditional, 2 jump,
//     3 call, 4 return), [28:22] taken probability in percent for a
//     conditional, [21:0] target word address.
//   * a memory that returns a requested line 8 cycles later,
//   * a back end: a 16-entry fetch queue, a minimum of 5 cycles from fetch to
//     commit, one commit per cycle with random stalls, an architectural
//     call stack, and detection of mispredictions at commit.
// The program runs under the TB, AB and AFA allocation policies in turn,
// with a reset between them.
// Checks: every delivered instruction equals the program word at its
// address; every committed instruction is on the architectural path (the
// flush removed all wrong-path work); each mechanism (one-way and all-way
// access, way replay, refill, BTB allocation, WFT update, RAS footprint
// update, return predicted from the RAS, misprediction flush, fetch stall,
// policy switch) happened at least once; the one-way access rate under AFA
// exceeds the one under TB, and the energy estimate with the per-access
// costs 1 (all-way), 0.2896 (one-way) and 0.054 (WFT read) falls with it.
module tb_wfp_frontend;
  import wfp_pkg::*;

  localparam int PW      = 16384;     // program space in words (64 KB)
  localparam int NHOT    = 14;        // hot functions, 0 is main
  localparam int NF      = NHOT + 6;  // plus cold functions
  localparam int NCOMMIT = 300000;    // committed instructions per policy
  localparam int FQ      = 16;        // back-end fetch queue
  localparam int LAT     = 5;         // fetch to earliest commit
  localparam int MEM_LAT = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  alloc_policy_e policy;
  logic          f_valid, f_ready, mem_req, mem_resp_valid;
  addr_t         f_pc, f_pred_pc, mem_addr;
  logic [31:0]   f_instr;
  commit_t       cm;
  logic [255:0]  mem_resp_line;
  logic [3:0]    ic_way_en;
  perf_t         perf;

  wfp_frontend dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  logic [31:0] prog [PW];
  int          fbase [NF];
  int          flen  [NF];

  function automatic logic [31:0] mk(int kind, int bias, int tgt);
    return {3'(kind), 7'(bias), 22'(tgt)};
  endfunction

  // Hot code: main (function 0) and NHOT-1 functions packed from address 0.
  // Cold code: NCOLD short functions at multiples of 8 KB, the cache's set
  // stride, so that together with the start of main they overfill the 4
  // ways of a few sets and force evictions every pass of the main loop.
  task automatic gen_program();
    int pos, r;
    for (int i = 0; i < PW; i++) prog[i] = mk(0, 0, 0);
    pos = 0;
    for (int f = 0; f < NF; f++) begin
      if (f < NHOT) begin
        fbase[f] = pos;
        flen[f]  = (f == 0) ? 2 * NF + 8 : 80 + int'($urandom_range(0, 60));
        pos += flen[f];
      end else begin
        fbase[f] = 2048 * (f - NHOT + 1);
        flen[f]  = 48;
      end
    end
    // main: calls every function once per pass, then jumps back to 0
    for (int k = 1; k < NF; k++) prog[2 * k - 1] = mk(3, 0, fbase[k]);
    prog[flen[0] - 1] = mk(2, 0, 0);
    for (int f = 1; f < NF; f++) begin
      int b, n;
      b = fbase[f]; n = flen[f];
      for (int j = 0; j < n - 1; j++) begin
        r = int'($urandom_range(0, 99));
        if (r < 8 && j + 10 < n - 1)
          prog[b + j] = mk(1, ($urandom_range(0, 1) != 0) ? 20 : 85, b + j + 2 + int'($urandom_range(0, 7)));
        else if (r < 11 && j >= 16)
          prog[b + j] = mk(1, 70, b + j - 3 - int'($urandom_range(0, 12)));
        else if (r < 13 && f < NHOT / 2)
          prog[b + j] = mk(3, 0, fbase[NHOT / 2 + int'($urandom_range(0, NHOT / 2 - 1))]);
        else if (r < 15 && j + 6 < n - 1)
          prog[b + j] = mk(2, 0, b + j + 1 + int'($urandom_range(0, 3)));
      end
      prog[b + n - 1] = mk(4, 0, 0);
    end
    $display("program: %0d words of hot code, %0d cold functions", pos, NF - NHOT);
  endtask

  // ---------------- memory ----------------
  int mem_cnt = 0;
  always @(negedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req && rst_n) begin
      mem_cnt <= mem_cnt + 1;
      if (mem_cnt == MEM_LAT) begin
        for (int i = 0; i < 8; i++)
          mem_resp_line[i*32 +: 32] <= prog[(int'(mem_addr >> 2) + i) % PW];
        mem_resp_valid <= 1'b1;
        mem_cnt        <= 0;
      end
    end else begin
      mem_cnt <= 0;
    end
  end

  // ---------------- back end ----------------
  typedef struct { addr_t pc; logic [31:0] ins; addr_t pred; int unsigned rdy; } fq_t;
  fq_t   fq [$];
  addr_t arch_pc;
  addr_t stack [$];
  int    ncommit;
  int    n_edge_calls, n_mp;

  task automatic execute(fq_t e, output commit_t c);
    int       kind, bias;
    addr_t    tgt, nxt;
    bit       tk;
    kind = int'(e.ins[31:29]);
    bias = int'(e.ins[28:22]);
    tgt  = addr_t'(e.ins[21:0]) << 2;
    tk   = 0;
    nxt  = e.pc + 4;
    case (kind)
      1: begin tk = int'($urandom_range(0, 99)) < bias; if (tk) nxt = tgt; end
      2: begin tk = 1; nxt = tgt; end
      3: begin tk = 1; nxt = tgt; stack.push_back(e.pc + 4);
               if (e.pc[4:2] == 3'b111) n_edge_calls++; end
      4: begin tk = 1; nxt = (stack.size() > 0) ? stack.pop_back() : addr_t'(0); end
      default: ;
    endcase
    c = '{valid: 1'b1, pc: e.pc, kind: br_kind_e'(kind), taken: tk, next_pc: nxt,
          miss_pred: e.pred != nxt};
  endtask

  task automatic run(alloc_policy_e pol, output perf_t res, output int unsigned cycles);
    int unsigned c0;
    policy = pol;
    cm = '0; f_ready = 0;
    fq.delete(); stack.delete();
    arch_pc = '0; ncommit = 0;
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    c0 = cycle;
    while (ncommit < NCOMMIT) begin
      commit_t c;
      @(negedge clk);
      c = '0;
      if (fq.size() > 0 && cycle >= fq[0].rdy && $urandom_range(0, 99) >= 15) begin
        fq_t e;
        e = fq.pop_front();
        check(e.pc == arch_pc, $sformatf("commit of %h off the path (expected %h)", e.pc, arch_pc));
        execute(e, c);
        arch_pc = c.next_pc;
        ncommit++;
        if (c.miss_pred) begin fq.delete(); n_mp++; end
      end
      cm      = c;
      f_ready = fq.size() < FQ;
      #1;
      if (f_valid) begin
        check(f_instr == prog[int'(f_pc >> 2) % PW], $sformatf("instruction at %h", f_pc));
        fq.push_back('{pc: f_pc, ins: f_instr, pred: f_pred_pc, rdy: cycle + LAT});
      end
    end
    @(negedge clk); cm = '0;
    res = perf;
    cycles = cycle - c0;
  endtask

  // ---------------- runs ----------------
  initial begin
    perf_t       p [3];
    int unsigned cyc [3];
    real         rate [3], energy [3];
    string       names [3] = '{"TB", "AB", "AFA"};
    logic [31:0] sum [12];

    policy = POL_TB; cm = '0; f_ready = 0; mem_resp_valid = 0; mem_resp_line = '0;
    n_edge_calls = 0; n_mp = 0;
    gen_program();
    repeat (2) @(posedge clk);
    for (int i = 0; i < 3; i++) begin
      run(alloc_policy_e'(i), p[i], cyc[i]);
      rate[i]   = real'(p[i].one_way) / real'(p[i].one_way + p[i].all_way);
      energy[i] = (real'(p[i].all_way) + 0.2896 * real'(p[i].one_way) + 0.054 * real'(p[i].wft_reads))
                  / real'(p[i].fetches + p[i].cache_misses);
      $display("%-3s cycles %0d fetches %0d one-way %0d all-way %0d replays %0d misses %0d btb-allocs %0d wft-upd %0d ras-upd %0d ras-pred %0d flushes %0d stalls %0d",
               names[i], cyc[i], p[i].fetches, p[i].one_way, p[i].all_way, p[i].way_replays,
               p[i].cache_misses, p[i].btb_allocs, p[i].wft_updates, p[i].ras_wf_updates,
               p[i].ras_predictions, p[i].flushes, p[i].stall_cycles);
      $display("%-3s one-way rate %0.3f  normalized hit energy %0.3f", names[i], rate[i], energy[i]);
      check(p[i].fetches >= NCOMMIT, "fetches at least commits");
      check(p[i].wft_reads == p[i].fetches, "one WFT read per prediction");
      check(p[i].one_way + p[i].all_way == p[i].fetches + p[i].way_replays + p[i].cache_misses,
            "accesses = fetches + replays + refilled repeats");
    end

    // every mechanism happened
    foreach (sum[k]) sum[k] = 0;
    for (int i = 0; i < 3; i++) begin
      sum[0] += p[i].one_way;        sum[1] += p[i].all_way;
      sum[2] += p[i].way_replays;    sum[3] += p[i].cache_misses;
      sum[4] += p[i].btb_allocs;     sum[5] += p[i].wft_updates;
      sum[6] += p[i].ras_wf_updates; sum[7] += p[i].ras_predictions;
      sum[8] += p[i].flushes;        sum[9] += p[i].stall_cycles;
    end
    $display("mechanisms: one-way %0d all-way %0d replay %0d refill %0d btb-alloc %0d wft-update %0d ras-update %0d ras-predict %0d flush %0d stall %0d policy-switch %0d line-end-calls %0d",
             sum[0], sum[1], sum[2], sum[3], sum[4], sum[5], sum[6], sum[7], sum[8], sum[9], 2, n_edge_calls);
    for (int k = 0; k < 10; k++) check(sum[k] > 0, $sformatf("mechanism %0d never happened", k));
    check(n_edge_calls > 0, "call at a line end never committed");
    check(n_mp == int'(sum[8]), "every misprediction flushed");

    // policy comparison
    check(rate[2] > rate[0], "AFA one-way rate above TB");
    check(rate[1] > rate[0] - 0.02, "AB one-way rate not clearly below TB");
    check(energy[2] < energy[0], "AFA energy below TB");
    check(rate[2] > 0.8, "AFA one-way rate high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
