// tb_comparator: exhaustive self-check of the 4-bit less-than comparator over
// all 256 operand pairs, equal operands included (lt must be 0).
module tb_comparator;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b;
  logic         lt;

  comparator #(.W(W)) dut (.a(a), .b(b), .lt(lt));

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
        if (lt !== (x < y)) begin
          failures++;
          $display("FAIL a=%0d b=%0d lt=%0b", x, y, lt);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
