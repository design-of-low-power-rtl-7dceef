// acsu: add-compare-select unit for the two branches entering one state.
//
// Each branch metric is added to the path metric of the state it leaves
// (sum0 = bm0 + pm0, sum1 = bm1 + pm1, each W+1 bits). The comparator gives
// lt = (sum0 < sum1), and the selector, whose select line is lt, passes the
// smaller sum as sel_pm: sum0 when lt = 1, sum1 otherwise, so a tie keeps
// branch 1. Adder, comparator and four-bit selector driven by the less-than
// output follow the circuit; the tie rule follows from the multiplexer's
// select polarity. Purely combinational.
module acsu #(
  parameter int unsigned W = viterbi_pkg::BM_W
) (
  input  logic [W-1:0] bm0,
  input  logic [W-1:0] bm1,
  input  logic [W-1:0] pm0,
  input  logic [W-1:0] pm1,
  output logic [W:0]   sum0,
  output logic [W:0]   sum1,
  output logic         lt,
  output logic [W:0]   sel_pm
);
  adder #(.W(W)) u_add0 (.a(bm0), .b(pm0), .s(sum0));
  adder #(.W(W)) u_add1 (.a(bm1), .b(pm1), .s(sum1));

  comparator #(.W(W+1)) u_cmp (.a(sum0), .b(sum1), .lt(lt));

  selector #(.W(W+1)) u_sel (.a(sum0), .b(sum1), .s(lt), .z(sel_pm));
endmodule
