// peres_gate: 3x3 reversible Peres gate.
//
// Outputs p = a, q = a ^ b, r = (a & b) ^ c, as the source architecture
// defines it. With c = 0 it is a half adder (q = sum, r = carry); two of
// them make the full adder of peres_full_adder. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
