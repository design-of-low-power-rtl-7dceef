// dff: rising-edge D flip-flop with true and inverted outputs.
//
// At transistor level this is a master-slave pair of pass-transistor latches,
// each a pass switch on the clock followed by two inverters with a feedback
// switch; at the register-transfer level it is one edge-triggered storage bit.
// On a rising edge of clk, q takes d; qb is always the complement of q.
// The pins (d, clk, q, qb) follow the circuit; the asynchronous active-low
// reset rst_n, which clears q to 0, is this design's addition so that a
// simulation starts from a known state.
module dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign qb = ~q;
endmodule
