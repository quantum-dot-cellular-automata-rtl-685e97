// qca_majority: three-input majority gate, the basic logic element of QCA.
//
// y = M(a,b,c) = ab + bc + ca. With one input held at 0 it is an AND of the
// other two, with one input held at 1 an OR; the adders and multipliers of
// this design are built from it. Purely combinational, no timing of its own
// (in a QCA layout it sits inside one clock zone).
module qca_majority (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
