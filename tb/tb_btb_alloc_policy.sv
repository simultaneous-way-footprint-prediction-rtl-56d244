// tb_btb_alloc_policy: exhaustive check of the BTB allocation decision
// against the policy table: TB allocates taken branches, AB any branch,
// AFA any instruction, and nothing is allocated on a hit or without valid.
module tb_btb_alloc_policy;
  import wfp_pkg::*;

  alloc_policy_e policy;
  logic valid, btb_hit, taken, alloc;
  br_kind_e kind;

  btb_alloc_policy dut (.*);

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    int n_alloc [3];
    n_alloc = '{0, 0, 0};
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < 5; k++)
        for (int v = 0; v < 2; v++)
          for (int h = 0; h < 2; h++)
            for (int t = 0; t < 2; t++) begin
              policy = alloc_policy_e'(p); kind = br_kind_e'(k);
              valid = 1'(v); btb_hit = 1'(h); taken = 1'(t);
              #1;
              if (!v || h)      exp = 0;
              else if (p == 2)  exp = 1;                       // AFA
              else if (p == 1)  exp = (k != 0);                // AB
              else              exp = (k != 0) && t;           // TB
              checks++;
              if (alloc !== exp) begin
                failures++;
                $display("FAIL: policy %0d kind %0d valid %0d hit %0d taken %0d -> %0d", p, k, v, h, t, alloc);
              end
              if (alloc) n_alloc[p]++;
            end
    // 5 kinds x 2 outcomes with valid and miss: TB 4 (taken branches), AB 8, AFA 10
    checks++;
    if (n_alloc[0] != 4 || n_alloc[1] != 8 || n_alloc[2] != 10) begin
      failures++;
      $display("FAIL: allocation counts %0d %0d %0d", n_alloc[0], n_alloc[1], n_alloc[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
