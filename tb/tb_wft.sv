// tb_wft: self-checking test of the way-footprint table.
// Checks the all-way reset value, field selection by direction, the
// "clear the other field" write, and then compares random reads against a
// reference array over random writes on a 8-set, 4-way table.
module tb_wft;
  import wfp_pkg::*;

  localparam int unsigned SETS = 8, WAYS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] rd_set, wr_set;
  logic [1:0] rd_way, wr_way;
  logic       rd_taken, we, wr_taken, wr_clear_other;
  wf_t        rd_wf, wr_wf;

  wft #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

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

  wf_t ref_t_q [SETS][WAYS];
  wf_t ref_f_q [SETS][WAYS];

  task automatic write(int s, int w, bit tk, bit clr, wf_t v);
    @(negedge clk);
    wr_set = 3'(s); wr_way = 2'(w); wr_taken = tk; wr_clear_other = clr; wr_wf = v; we = 1;
    @(posedge clk); #1 we = 0;
    if (tk) begin ref_t_q[s][w] = v; if (clr) ref_f_q[s][w] = WF_ALL; end
    else    begin ref_f_q[s][w] = v; if (clr) ref_t_q[s][w] = WF_ALL; end
  endtask

  task automatic read(int s, int w, bit tk);
    wf_t exp;
    @(negedge clk);
    rd_set = 3'(s); rd_way = 2'(w); rd_taken = tk;
    #1;
    exp = tk ? ref_t_q[s][w] : ref_f_q[s][w];
    check(rd_wf == exp, $sformatf("read (%0d,%0d,%0d) = %0d exp %0d", w, s, tk, rd_wf, exp));
  endtask

  initial begin
    we = 0; rd_set = 0; rd_way = 0; rd_taken = 0; wr_set = 0; wr_way = 0;
    wr_taken = 0; wr_clear_other = 0; wr_wf = '0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      ref_t_q[s][w] = WF_ALL; ref_f_q[s][w] = WF_ALL;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      read(s, w, 0); read(s, w, 1);
    end
    write(3, 2, 1, 0, wf_t'(1));
    read(3, 2, 1); read(3, 2, 0);
    check(ref_t_q[3][2] == 1 && ref_f_q[3][2] == WF_ALL, "reference after first write");
    write(3, 2, 0, 0, wf_t'(3));
    read(3, 2, 1); read(3, 2, 0);
    write(3, 2, 0, 1, wf_t'(0));               // new entry: target field cleared
    read(3, 2, 1); read(3, 2, 0);
    check(rd_wf == wf_t'(0), "fall-through written");
    for (int n = 0; n < 1000; n++) begin
      if ($urandom_range(0, 1))
        write($urandom_range(0, SETS-1), $urandom_range(0, WAYS-1), 1'($urandom_range(0, 1)),
              1'($urandom_range(0, 3) == 0), wf_t'($urandom_range(0, IC_WAYS)));
      else
        read($urandom_range(0, SETS-1), $urandom_range(0, WAYS-1), 1'($urandom_range(0, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
