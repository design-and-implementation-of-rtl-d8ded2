// mux2: 2:1 multiplexer, y = sel ? b : a.
//
// In the transistor-level design this is a pair of CMOS pass gates driven
// by sel and its complement; here it is the equivalent logic. Purely
// combinational, no clock. In the serializer cell the select input is the
// cell clock itself, so the output takes one input while the clock is low
// and the other while it is high.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic sel,
  output logic y
);

  always_comb y = sel ? b : a;

endmodule
