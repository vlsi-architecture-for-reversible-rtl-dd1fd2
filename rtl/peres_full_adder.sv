// peres_full_adder: 1-bit full adder built from two Peres gates.
//
// The first gate takes (a, b, 0) and gives a ^ b and a & b. The second takes
// (cin, a ^ b, a & b) and gives sum = a ^ b ^ cin and cout = cin & (a ^ b) ^
// (a & b). The two unused gate outputs (a and cin) are brought out as
// garbage. Structure as in the source architecture's Peres full adder
// figure; purely combinational.
module peres_full_adder (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  output logic       sum,
  output logic       cout,
  output logic [1:0] garbage
);
  logic axb, aab;

  peres_gate u_pg0 (.a(a),   .b(b),   .c(1'b0), .p(garbage[0]), .q(axb), .r(aab));
  peres_gate u_pg1 (.a(cin), .b(axb), .c(aab),  .p(garbage[1]), .q(sum), .r(cout));
endmodule
