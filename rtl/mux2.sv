// mux2: single-bit 2:1 multiplexer, z = s ? a : b.
//
// In pass-transistor form this is two pass switches, one on each data input,
// steered by s and its inverse sb (four transistors with the inverter). Here it
// is written as the logic equation z = (a & s) | (b & ~s). Select 1 passes a,
// select 0 passes b, as the circuit specifies. Purely combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic z
);
  logic sb;

  assign sb = ~s;
  assign z  = (a & s) | (b & sb);
endmodule
