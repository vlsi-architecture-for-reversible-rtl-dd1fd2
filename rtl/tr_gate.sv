// tr_gate: 3x3 reversible TR gate.
//
// Outputs p = a, q = a ^ b, r = (a & ~b) ^ c. The source architecture names
// the gate and says it works as a half subtractor when the third input is 0;
// the equations are the usual TR gate ones. Fed as (b, a, 0) it gives the
// difference a ^ b on q and the borrow ~a & b of a - b on r. Combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
