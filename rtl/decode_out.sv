// decode_out: decoded-output path, a 2:1 mux followed by a shift register of
// DEPTH D flip-flops.
//
// The mux passes a when sel = 1 and b when sel = 0; in the decoder sel is the
// comparator's less-than output, so the bit that belongs to the surviving
// branch is chosen. The chosen bit leaves at dout DEPTH rising clock edges
// later (two with the default). The mux and two-bit shift register follow the
// circuit; rst_n (asynchronous, active low) is this design's addition.
module decode_out #(
  parameter int unsigned DEPTH = viterbi_pkg::OUT_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic dout
);
  logic [DEPTH:0] chain;

  mux2 u_mux (.a(a), .b(b), .s(sel), .z(chain[0]));

  for (genvar i = 0; i < DEPTH; i++) begin : g_ff
    dff u_dff (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (chain[i]),
      .q    (chain[i+1]),
      .qb   ()
    );
  end

  assign dout = chain[DEPTH];
endmodule
