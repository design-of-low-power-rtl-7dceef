// adder: W-bit ripple-carry adder with carry out, s = a + b (W+1 bits).
//
// Adds a branch metric to a previous path metric. The result keeps the carry
// as its most significant bit, so two 3-bit operands give a 4-bit sum and no
// metric is lost to overflow. The circuit names only a "3 bit adder"; the
// ripple of full adders and the absence of a carry-in are this design's
// choices. Purely combinational.
module adder #(
  parameter int unsigned W = viterbi_pkg::BM_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);
  logic [W:0] c;  // c[i]: carry into bit i

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign s[W] = c[W];
endmodule
