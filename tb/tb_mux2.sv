// tb_mux2: exhaustive self-check of the 2:1 multiplexer (z = s ? a : b)
// over all eight input combinations.
module tb_mux2;
  int checks = 0, failures = 0;
  logic a, b, s, z;

  mux2 dut (.a(a), .b(b), .s(s), .z(z));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, a, b} = 3'(v);
      #1;
      checks++;
      if (z !== (s ? a : b)) begin
        failures++;
        $display("FAIL s=%0b a=%0b b=%0b z=%0b", s, a, b, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
