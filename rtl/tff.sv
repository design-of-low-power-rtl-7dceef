// tff: T flip-flop made from a D flip-flop and an XOR gate.
//
// The D input is t XOR q, so on a rising clock edge the stored bit toggles
// when t is 1 and holds when t is 0. Building the T flip-flop from a D
// flip-flop and a gate follows the circuit; the choice of an XOR as that gate
// and the asynchronous active-low reset (q = 0) are this design's own.
module tff (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q,
  output logic qb
);
  logic d;

  assign d = t ^ q;

  dff u_dff (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (d),
    .q    (q),
    .qb   (qb)
  );
endmodule
