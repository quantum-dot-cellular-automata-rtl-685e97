// qca_inverter: the QCA inverter, y = not a.
//
// In a QCA layout the inversion comes from diagonally placed cells taking the
// opposite polarisation; logically it is a NOT gate. Combinational. It is
// kept as its own cell so that the full adder is written from the same
// primitives (majority gate, inverter) as its QCA layout.
module qca_inverter (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
