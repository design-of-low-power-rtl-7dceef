// selector: W-bit 2:1 selector, z = s ? a : b, built from W single-bit mux2
// instances that share the select line.
//
// In the decoder a and b are the two adder results and s is the comparator's
// less-than output, so the smaller sum is passed on. The composition from four
// 2:1 multiplexers (W = 4) follows the circuit. Purely combinational.
module selector #(
  parameter int unsigned W = viterbi_pkg::SUM_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         s,
  output logic [W-1:0] z
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    mux2 u_mux (
      .a(a[i]),
      .b(b[i]),
      .s(s),
      .z(z[i])
    );
  end
endmodule
