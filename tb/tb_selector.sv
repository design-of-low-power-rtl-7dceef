// tb_selector: exhaustive self-check of the 4-bit selector over every pair of
// words and both select values: s = 1 must pass a, s = 0 must pass b.
module tb_selector;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, z;
  logic         s;

  selector #(.W(W)) dut (.a(a), .b(b), .s(s), .z(z));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {s, a, b} = (2*W+1)'(v);
      #1;
      checks++;
      if (z !== (s ? a : b)) begin
        failures++;
        $display("FAIL s=%0b a=%h b=%h z=%h", s, a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
