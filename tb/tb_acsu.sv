// tb_acsu: exhaustive self-check of the add-compare-select unit over all
// 4096 combinations of two 3-bit branch metrics and two 3-bit path metrics.
// Expected: sum0 = bm0 + pm0, sum1 = bm1 + pm1, lt = sum0 < sum1 and the
// selected metric is the smaller sum (sum1 on a tie). Counts how often each
// branch won and how often the sums tied; each must occur.
module tb_acsu;
  localparam int W = 3;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_tie = 0;
  logic [W-1:0] bm0, bm1, pm0, pm1;
  logic [W:0]   sum0, sum1, sel_pm;
  logic         lt;

  acsu #(.W(W)) dut (
    .bm0(bm0), .bm1(bm1), .pm0(pm0), .pm1(pm1),
    .sum0(sum0), .sum1(sum1), .lt(lt), .sel_pm(sel_pm)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0, s1, smin;
    for (int v = 0; v < (1 << (4*W)); v++) begin
      {bm0, bm1, pm0, pm1} = (4*W)'(v);
      #1;
      s0   = int'(bm0) + int'(pm0);
      s1   = int'(bm1) + int'(pm1);
      smin = (s0 < s1) ? s0 : s1;
      if (s0 < s1) n_sel0++;
      else if (s0 > s1) n_sel1++;
      else n_tie++;
      checks++;
      if (int'(sum0) != s0 || int'(sum1) != s1 || lt !== (s0 < s1) || int'(sel_pm) != smin) begin
        failures++;
        $display("FAIL bm0=%0d pm0=%0d bm1=%0d pm1=%0d: sum0=%0d sum1=%0d lt=%0b sel=%0d",
                 bm0, pm0, bm1, pm1, sum0, sum1, lt, sel_pm);
      end
    end
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0 || n_tie == 0) failures++;
    $display("branch0 chosen %0d, branch1 chosen %0d, ties %0d", n_sel0, n_sel1, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
