// tb_siso_shift_register: self-check of one survivor memory stage (4 flip-
// flops). A random bit stream is shifted in; after every rising edge each tap
// must hold the bit that entered that many edges before (taps[3] one edge,
// taps[0] = q four edges), and qb must be the complement of q.
module tb_siso_shift_register;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q, qb;
  logic [DEPTH-1:0] taps;
  logic [DEPTH-1:0] hist;  // hist[DEPTH-1] = newest bit

  siso_shift_register #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .d(d), .q(q), .qb(qb), .taps(taps)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    d = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (taps !== '0 || q !== 1'b0) failures++;
    @(negedge clk) begin rst_n = 1'b1; d = 1'b0; end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) d = 1'($urandom);
      @(posedge clk);
      hist = {d, hist[DEPTH-1:1]};
      #1;
      checks++;
      if (taps !== hist || q !== hist[0] || qb !== ~hist[0]) begin
        failures++;
        $display("FAIL cycle %0d taps=%b expected %b q=%0b qb=%0b", i, taps, hist, q, qb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
