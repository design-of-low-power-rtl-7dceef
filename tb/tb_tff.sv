// tb_tff: self-check of the T flip-flop. After reset, random t values are
// applied; on each rising edge q must toggle when t = 1 and hold when t = 0,
// with qb its complement.
module tb_tff;
  int checks = 0, failures = 0;
  int toggles = 0;
  logic clk = 1'b0, rst_n = 1'b0, t = 1'b1, q, qb;
  logic exp_q;

  tff dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q), .qb(qb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 1'b0) failures++;
    @(negedge clk) begin rst_n = 1'b1; t = 1'b0; end
    exp_q = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) t = 1'($urandom);
      @(posedge clk);
      if (t) begin
        exp_q = ~exp_q;
        toggles++;
      end
      #1;
      checks++;
      if (q !== exp_q || qb !== ~exp_q) begin
        failures++;
        $display("FAIL cycle %0d t=%0b q=%0b expected %0b", i, t, q, exp_q);
      end
    end
    checks++;
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
