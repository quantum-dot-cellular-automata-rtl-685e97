// qca_full_adder: 1-bit full adder from three majority gates and two inverters.
//
//   cout = M(a, b, cin)
//   t    = M(a, b, not cin)
//   sum  = M(not cout, cin, t)       (= a xor b xor cin)
//
// The adder function (sum = a xor b xor cin plus a carry) is the one the QCA
// design is based on; the particular three-majority gate structure is the
// well-known majority-logic form chosen here, since the cell layout of the
// QCA adder does not map onto gates. Combinational, no clock.
module qca_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic cin_n, cout_n, t;

  qca_majority u_carry (.a(a),      .b(b),   .c(cin),   .y(cout));
  qca_inverter u_inv_c (.a(cin),    .y(cin_n));
  qca_majority u_t     (.a(a),      .b(b),   .c(cin_n), .y(t));
  qca_inverter u_inv_o (.a(cout),   .y(cout_n));
  qca_majority u_sum   (.a(cout_n), .b(cin), .c(t),     .y(sum));
endmodule
