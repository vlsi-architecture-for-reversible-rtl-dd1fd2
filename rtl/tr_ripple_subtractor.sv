// tr_ripple_subtractor: WIDTH-bit ripple-borrow subtractor of TR gates.
//
// diff = a - b - bin modulo 2^WIDTH, bout is the borrow out of the top bit.
// Each bit uses two TR gates. TRG(b, a, 0) is the half subtractor a - b
// (difference a ^ b, borrow ~a & b). TRG(bin, a ^ b, borrow1) subtracts the
// incoming borrow; its third input folds the first borrow in, which works
// because the two partial borrows are never 1 together. The source
// architecture only says the Peres/TR method uses TR gates as half
// subtractors; this two-gate cell is this design's own. Purely
// combinational.
module tr_ripple_subtractor #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             bin,
  output logic [WIDTH-1:0] diff,
  output logic             bout
);
  logic [WIDTH:0] borrow;
  assign borrow[0] = bin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic d1, b1, unused_p0, unused_p1;
    tr_gate u_hs0 (.a(b[i]),      .b(a[i]), .c(1'b0), .p(unused_p0), .q(d1),      .r(b1));
    tr_gate u_hs1 (.a(borrow[i]), .b(d1),   .c(b1),   .p(unused_p1), .q(diff[i]), .r(borrow[i+1]));
  end

  assign bout = borrow[WIDTH];
endmodule
