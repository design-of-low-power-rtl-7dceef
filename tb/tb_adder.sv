// tb_adder: exhaustive self-check of the 3-bit adder: the 4-bit result must
// equal the integer sum of the operands for all 64 operand pairs.
module tb_adder;
  localparam int W = 3;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b;
  logic [W:0]   s;

  adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++) begin
        a = W'(x);
        b = W'(y);
        #1;
        checks++;
        if (int'(s) != x + y) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d", x, y, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
