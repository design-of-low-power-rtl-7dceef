// tb_dff: self-check of the rising-edge D flip-flop. Checks the asynchronous
// reset, then for random data changed mid-cycle that q takes d on each
// rising edge only and holds it through the falling edge, and that qb is
// always its complement.
module tb_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q, qb;
  logic exp_q;

  dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qb(qb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic e);
    checks++;
    if (q !== e || qb !== ~e) begin
      failures++;
      $display("FAIL t=%0t q=%0b qb=%0b expected q=%0b", $time, q, qb, e);
    end
  endtask

  initial begin
    d = 1'b1;
    repeat (2) @(posedge clk);
    #1 expect_q(1'b0);  // reset holds q low despite d = 1
    @(negedge clk) begin rst_n = 1'b1; d = 1'b0; end
    exp_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      // new data early in the high phase; it must not reach q before the
      // next rising edge, in particular not at the falling edge
      #1 d = 1'($urandom);
      @(negedge clk);
      #1 expect_q(exp_q);
      @(posedge clk);
      exp_q = d;
      #1 expect_q(exp_q);
    end
    // asynchronous reset between edges
    @(negedge clk) d = 1'b1;
    @(posedge clk);
    #2 rst_n = 1'b0;
    #1 expect_q(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
