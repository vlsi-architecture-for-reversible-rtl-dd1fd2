// dkg_gate: 4x4 reversible DKG gate, the programmable cell of the design.
//
// Inputs (p, q, r, s), outputs
//   a = q
//   b = ~p&r | p&~s
//   c = ((p ^ q) & (r ^ s)) ^ (r & s)
//   d = q ^ r ^ s
// With p = 0 the gate is a full adder of q, r, s (c = carry, d = sum); with
// p = 1 it is a full subtractor q - r - s (c = borrow, d = difference).
// a and b are the garbage outputs that keep the mapping one-to-one. The
// equations are the source architecture's; the gate is purely combinational.
module dkg_gate (
  input  logic p,
  input  logic q,
  input  logic r,
  input  logic s,
  output logic a,
  output logic b,
  output logic c,
  output logic d
);
  assign a = q;
  assign b = (~p & r) | (p & ~s);
  assign c = ((p ^ q) & (r ^ s)) ^ (r & s);
  assign d = q ^ r ^ s;
endmodule
