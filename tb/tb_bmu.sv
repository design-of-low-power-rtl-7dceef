// tb_bmu: self-check of the branch metric unit. Received and expected bit
// streams are driven one pair per clock; the count must equal the Hamming
// distance of the pairs since the last clear (modulo 8), counting only while
// T is high. A directed branch checks that consecutive mismatching bits each
// count, then random branches of 2 to 9 bits are checked after every edge.
module tb_bmu;
  localparam int W = 3;
  int checks = 0, failures = 0;
  int runs = 0, gated = 0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, a = 1'b0, b = 1'b0, t = 1'b1;
  logic [W-1:0] q;
  int hd;

  bmu #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .a(a), .b(b), .t(t), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ra, input logic rb, input logic rt, input logic rclr);
    @(negedge clk);
    a = ra;
    b = rb;
    t = rt;
    clr = rclr;
    @(posedge clk);
    if (rclr) hd = 0;
    else if (rt && (ra != rb)) hd = (hd + 1) % (1 << W);
    #1;
    checks++;
    if (int'(q) != hd) begin
      failures++;
      $display("FAIL t=%0t a=%0b b=%0b T=%0b clr=%0b q=%0d expected %0d", $time, ra, rb, rt, rclr, q, hd);
    end
  endtask

  initial begin
    hd = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != 0) failures++;
    @(negedge clk) rst_n = 1'b1;
    // received 1 0 1 1 against expected 0 1 1 0: distance 3, the first two
    // mismatches in a row
    step(1'b1, 1'b0, 1'b1, 1'b0);
    step(1'b0, 1'b1, 1'b1, 1'b0);
    runs++;
    step(1'b1, 1'b1, 1'b1, 1'b0);
    step(1'b1, 1'b0, 1'b1, 1'b0);
    checks++;
    if (q != 3'd3) failures++;
    for (int br = 0; br < 200; br++) begin
      step(1'b0, 1'b0, 1'b1, 1'b1);  // clear: new branch
      for (int k = 0; k < 2 + int'($urandom % 8); k++) begin
        logic ra, rb, rt;
        ra = 1'($urandom);
        rb = 1'($urandom);
        rt = ($urandom % 8) != 0;
        if (!rt && ra != rb) gated++;
        step(ra, rb, rt, 1'b0);
      end
    end
    checks++;
    if (gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
