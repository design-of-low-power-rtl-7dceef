// tcounter: W-bit binary up counter built from a cascade of T flip-flops.
//
// Stage 0 toggles on each rising clock edge where en is 1; stage i toggles when
// en is 1 and all lower stages are 1, which is a binary increment. The count
// wraps from 2**W-1 to 0. A synchronous clr forces every stage that holds a 1
// to toggle, returning the count to 0 on the next edge while using only T
// flip-flops; clr has priority over en.
//
// The circuit this follows cascades T flip-flops as a ripple counter, each
// stage clocked by the one before. Here all stages share the clock and the
// carry is formed from the lower bits instead; the counted value per edge is
// the same, and every count enable is seen even when it stays high for several
// cycles. The clear and the reset (rst_n, asynchronous, active low) are this
// design's additions.
module tcounter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q
);
  logic [W-1:0] t;
  logic [W-1:0] carry;  // carry[i]: en and all bits below i are 1

  assign carry[0] = en;

  for (genvar i = 1; i < W; i++) begin : g_carry
    assign carry[i] = carry[i-1] & q[i-1];
  end

  assign t = clr ? q : carry;

  for (genvar i = 0; i < W; i++) begin : g_stage
    tff u_tff (
      .clk  (clk),
      .rst_n(rst_n),
      .t    (t[i]),
      .q    (q[i]),
      .qb   ()
    );
  end
endmodule
