// tb_tcounter: self-check of the 3-bit T flip-flop counter against an integer
// model: random enable and clear, with the count checked after every rising
// edge. Requires the count to wrap from 7 to 0 and the clear to be used at
// least once.
module tb_tcounter;
  localparam int W = 3;
  int checks = 0, failures = 0;
  int wraps = 0, clears = 0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [W-1:0] q;
  int model;

  tcounter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 23) == 0;
      @(posedge clk);
      if (clr) begin
        if (model != 0) clears++;
        model = 0;
      end else if (en) begin
        if (model == (1 << W) - 1) wraps++;
        model = (model + 1) % (1 << W);
      end
      #1;
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL cycle %0d q=%0d expected %0d", i, q, model);
      end
    end
    checks++;
    if (wraps == 0 || clears == 0) failures++;
    $display("wraps %0d, clears %0d", wraps, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
