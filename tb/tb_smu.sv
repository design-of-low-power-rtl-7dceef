// tb_smu: self-check of the survivor memory unit (four registers of four
// stages). Random 4-bit words are shifted in; after every rising edge the
// serial outputs must equal the word that entered four edges before, qb
// their complement, and every tap the word of its own delay.
module tb_smu;
  localparam int N = 4, DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d = '0, q, qb;
  logic [N*DEPTH-1:0] taps;
  logic [N-1:0] hist [DEPTH];  // hist[0] newest word

  smu #(.N(N), .DEPTH(DEPTH)) dut (
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
    logic [N*DEPTH-1:0] exp_taps;
    for (int k = 0; k < DEPTH; k++) hist[k] = '0;
    d = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0 || taps !== '0) failures++;
    @(negedge clk) begin rst_n = 1'b1; d = '0; end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk) d = N'($urandom);
      @(posedge clk);
      for (int k = DEPTH - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;
      // register r, tap DEPTH-1-k holds the bit that entered k+1 edges ago
      for (int r = 0; r < N; r++)
        for (int k = 0; k < DEPTH; k++)
          exp_taps[r*DEPTH + (DEPTH-1-k)] = hist[k][r];
      #1;
      checks++;
      if (q !== hist[DEPTH-1] || qb !== ~hist[DEPTH-1] || taps !== exp_taps) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h taps=%h expected %h", i, q, hist[DEPTH-1], taps, exp_taps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
