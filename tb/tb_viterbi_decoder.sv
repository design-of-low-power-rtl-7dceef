// tb_viterbi_decoder: end-to-end self-check of the decoder stage at its
// default sizes (3-bit branch metrics, four 4-stage survivor registers).
//
// A cycle-accurate integer model of the whole stage (two Hamming-distance
// counters, adders, less-than compare, selection with ties to branch 1,
// survivor shift registers, output mux and two-flip-flop register) runs
// beside the design and every output is compared after every rising edge.
//
// Part 1 runs three trellis steps with hand-worked expected metrics: clear
// the counters, present the 2-bit received symbol against each branch's
// expected symbol, then add the given path metrics and select.
// Part 2 runs 400 random trellis steps of the same shape, with the
// decoded-bit candidates and path metrics random.
// Part 3 drives every input at random every cycle, which reaches counter
// wrap-around and T gating.
// Each mechanism of the design is counted and must occur at least once:
// branch 0 selected, branch 1 selected, tie, counter clear, counter wrap,
// count held by T = 0, adder carry into bit 3, decoded bit taken from each
// mux input, and a survivor word leaving the survivor memory.
module tb_viterbi_decoder;
  localparam int BM_W = 3, SMU_DEPTH = 4, OUT_DEPTH = 2;
  localparam int BM_MOD = 1 << BM_W;

  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_tie = 0, n_clear = 0, n_wrap = 0, n_gate = 0;
  int n_carry = 0, n_dout_a = 0, n_dout_b = 0, n_smu_out = 0;

  logic clk = 1'b0, rst_n = 1'b0, bm_clr = 1'b0;
  logic bmu0_a = 1'b0, bmu0_b = 1'b0, bmu0_t = 1'b1;
  logic bmu1_a = 1'b0, bmu1_b = 1'b0, bmu1_t = 1'b1;
  logic [BM_W-1:0] pm0 = '0, pm1 = '0;
  logic dec_a = 1'b0, dec_b = 1'b0;
  logic [BM_W-1:0] bm0, bm1;
  logic [BM_W:0]   sum0, sum1, new_pm, smu_q, smu_qb;
  logic [(BM_W+1)*SMU_DEPTH-1:0] smu_taps;
  logic lt, dout;

  viterbi_decoder dut (
    .clk(clk), .rst_n(rst_n), .bm_clr(bm_clr),
    .bmu0_a(bmu0_a), .bmu0_b(bmu0_b), .bmu0_t(bmu0_t),
    .bmu1_a(bmu1_a), .bmu1_b(bmu1_b), .bmu1_t(bmu1_t),
    .pm0(pm0), .pm1(pm1), .dec_a(dec_a), .dec_b(dec_b),
    .bm0(bm0), .bm1(bm1), .sum0(sum0), .sum1(sum1), .lt(lt),
    .new_pm(new_pm), .smu_q(smu_q), .smu_qb(smu_qb), .smu_taps(smu_taps),
    .dout(dout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  int m_bm0, m_bm1;
  int m_smu [SMU_DEPTH];   // [0] newest word
  int m_out [OUT_DEPTH];   // [0] newest bit

  function automatic int f_sum(input int bm, input logic [BM_W-1:0] pm);
    return bm + int'(pm);
  endfunction

  function automatic int next_count(input int c, input logic clr, input logic t,
                                    input logic a, input logic b, inout int wraps, inout int gates,
                                    inout int clears);
    if (clr) begin
      if (c != 0) clears++;
      return 0;
    end
    if (a != b) begin
      if (!t) begin
        gates++;
        return c;
      end
      if (c == BM_MOD - 1) wraps++;
      return (c + 1) % BM_MOD;
    end
    return c;
  endfunction

  // Called at each rising edge, before the design's outputs change.
  task automatic model_edge();
    int s0, s1, sel;
    logic l, bit_out;
    s0  = f_sum(m_bm0, pm0);
    s1  = f_sum(m_bm1, pm1);
    l   = s0 < s1;
    sel = l ? s0 : s1;
    bit_out = l ? dec_a : dec_b;
    if (dec_a != dec_b) begin
      if (l) n_dout_a++;
      else n_dout_b++;
    end
    for (int k = SMU_DEPTH - 1; k > 0; k--) m_smu[k] = m_smu[k-1];
    m_smu[0] = sel;
    for (int k = OUT_DEPTH - 1; k > 0; k--) m_out[k] = m_out[k-1];
    m_out[0] = int'(bit_out);
    m_bm0 = next_count(m_bm0, bm_clr, bmu0_t, bmu0_a, bmu0_b, n_wrap, n_gate, n_clear);
    m_bm1 = next_count(m_bm1, bm_clr, bmu1_t, bmu1_a, bmu1_b, n_wrap, n_gate, n_clear);
  endtask

  task automatic compare(input string where);
    int s0, s1, sel;
    logic l;
    logic [(BM_W+1)*SMU_DEPTH-1:0] exp_taps;
    s0  = f_sum(m_bm0, pm0);
    s1  = f_sum(m_bm1, pm1);
    l   = s0 < s1;
    sel = l ? s0 : s1;
    for (int r = 0; r <= BM_W; r++)
      for (int k = 0; k < SMU_DEPTH; k++)
        exp_taps[r*SMU_DEPTH + (SMU_DEPTH-1-k)] = 1'(m_smu[k] >> r);
    checks++;
    if (int'(bm0) != m_bm0 || int'(bm1) != m_bm1 || int'(sum0) != s0 || int'(sum1) != s1 ||
        lt !== l || int'(new_pm) != sel || int'(smu_q) != m_smu[SMU_DEPTH-1] ||
        smu_qb !== ~smu_q || smu_taps !== exp_taps || int'(dout) != m_out[OUT_DEPTH-1]) begin
      failures++;
      $display("FAIL %s t=%0t bm=%0d/%0d (exp %0d/%0d) sum=%0d/%0d (exp %0d/%0d) lt=%0b new_pm=%0d (exp %0d) smu_q=%0d (exp %0d) dout=%0b (exp %0d)",
               where, $time, bm0, bm1, m_bm0, m_bm1, sum0, sum1, s0, s1, lt, new_pm, sel,
               smu_q, m_smu[SMU_DEPTH-1], dout, m_out[OUT_DEPTH-1]);
    end
  endtask

  // One clock: inputs change at the falling edge, the model and the design
  // advance at the rising edge, outputs are compared just after it.
  task automatic cycle(input logic clr, input logic a0, input logic b0, input logic t0,
                       input logic a1, input logic b1, input logic t1,
                       input logic [BM_W-1:0] p0, input logic [BM_W-1:0] p1,
                       input logic da, input logic db, input string where);
    @(negedge clk);
    bm_clr = clr;
    bmu0_a = a0; bmu0_b = b0; bmu0_t = t0;
    bmu1_a = a1; bmu1_b = b1; bmu1_t = t1;
    pm0 = p0; pm1 = p1; dec_a = da; dec_b = db;
    #1 compare({where, " (before edge)"});
    @(posedge clk);
    model_edge();
    #1 compare(where);
    begin
      int s0, s1;
      s0 = f_sum(m_bm0, pm0);
      s1 = f_sum(m_bm1, pm1);
      if (s0 < s1) n_sel0++;
      else if (s0 > s1) n_sel1++;
      else n_tie++;
      if (s0 >= 8 || s1 >= 8) n_carry++;
      if (m_smu[SMU_DEPTH-1] != 0) n_smu_out++;
    end
  endtask

  // One trellis step: clear, two symbol bits per branch, then a hold cycle
  // (T low) in which the path metrics are added and the survivor selected.
  task automatic trellis_step(input logic [1:0] rx, input logic [1:0] exp0, input logic [1:0] exp1,
                              input logic [BM_W-1:0] p0, input logic [BM_W-1:0] p1,
                              input logic da, input logic db);
    cycle(1'b1, 0, 0, 1, 0, 0, 1, p0, p1, da, db, "clear");
    cycle(1'b0, rx[1], exp0[1], 1, rx[1], exp1[1], 1, p0, p1, da, db, "bit 1");
    cycle(1'b0, rx[0], exp0[0], 1, rx[0], exp1[0], 1, p0, p1, da, db, "bit 0");
    cycle(1'b0, 0, 0, 0, 0, 0, 0, p0, p1, da, db, "select");
  endtask

  task automatic expect_step(input int e_bm0, input int e_bm1, input int e_sum0, input int e_sum1,
                             input logic e_lt, input int e_pm);
    checks++;
    if (int'(bm0) != e_bm0 || int'(bm1) != e_bm1 || int'(sum0) != e_sum0 ||
        int'(sum1) != e_sum1 || lt !== e_lt || int'(new_pm) != e_pm) begin
      failures++;
      $display("FAIL worked step: bm %0d/%0d sum %0d/%0d lt %0b pm %0d", bm0, bm1, sum0, sum1, lt, new_pm);
    end
  endtask

  initial begin
    m_bm0 = 0;
    m_bm1 = 0;
    for (int k = 0; k < SMU_DEPTH; k++) m_smu[k] = 0;
    for (int k = 0; k < OUT_DEPTH; k++) m_out[k] = 0;
    repeat (3) @(posedge clk);
    #1 compare("reset");
    @(negedge clk) rst_n = 1'b1;

    // Part 1: worked steps.
    // rx 10, branch 0 expects 11 (distance 1), branch 1 expects 00 (1);
    // path metrics 2 and 0: sums 3 and 1, branch 1 survives with 1.
    trellis_step(2'b10, 2'b11, 2'b00, 3'd2, 3'd0, 1'b1, 1'b0);
    expect_step(1, 1, 3, 1, 1'b0, 1);
    // rx 11 against 11 (0) and 00 (2); metrics 3 and 1: tie at 3, branch 1.
    trellis_step(2'b11, 2'b11, 2'b00, 3'd3, 3'd1, 1'b1, 1'b0);
    expect_step(0, 2, 3, 3, 1'b0, 3);
    // rx 01 against 01 (0) and 10 (2); metrics 1 and 2: sums 1 and 4,
    // branch 0 survives with 1.
    trellis_step(2'b01, 2'b01, 2'b10, 3'd1, 3'd2, 1'b1, 1'b0);
    expect_step(0, 2, 1, 4, 1'b1, 1);

    // Part 2: random trellis steps.
    for (int s = 0; s < 400; s++)
      trellis_step(2'($urandom), 2'($urandom), 2'($urandom), 3'($urandom), 3'($urandom),
                   1'($urandom), 1'($urandom));

    // Part 3: every input random every cycle.
    for (int c = 0; c < 2000; c++)
      cycle(($urandom % 16) == 0, 1'($urandom), 1'($urandom), ($urandom % 6) != 0,
            1'($urandom), 1'($urandom), ($urandom % 6) != 0, 3'($urandom), 3'($urandom),
            1'($urandom), 1'($urandom), "random");

    $display("branch0 %0d, branch1 %0d, ties %0d, clears %0d, wraps %0d, T-held %0d, carries %0d",
             n_sel0, n_sel1, n_tie, n_clear, n_wrap, n_gate, n_carry);
    $display("decoded from a %0d, from b %0d, survivor words out %0d", n_dout_a, n_dout_b, n_smu_out);
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0 || n_tie == 0 || n_clear == 0 || n_wrap == 0 || n_gate == 0 ||
        n_carry == 0 || n_dout_a == 0 || n_dout_b == 0 || n_smu_out == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
