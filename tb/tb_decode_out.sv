// tb_decode_out: self-check of the decoded-output path. Random a, b and
// select values are applied each cycle; dout must equal (sel ? a : b) of two
// rising edges before. Both mux inputs must be seen winning.
module tb_decode_out;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, sel = 1'b0, dout;
  logic [1:0] pipe;  // pipe[0] newest

  decode_out #(.DEPTH(2)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .sel(sel), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pipe = '0;
    a = 1'b1;
    b = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (dout !== 1'b0) failures++;
    @(negedge clk) begin rst_n = 1'b1; a = 1'b0; b = 1'b0; end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = 1'($urandom);
      b = 1'($urandom);
      sel = 1'($urandom);
      if (a != b) begin
        if (sel) n_a++;
        else n_b++;
      end
      @(posedge clk);
      pipe = {pipe[0], sel ? a : b};
      #1;
      checks++;
      if (dout !== pipe[1]) begin
        failures++;
        $display("FAIL cycle %0d dout=%0b expected %0b", i, dout, pipe[1]);
      end
    end
    checks++;
    if (n_a == 0 || n_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
