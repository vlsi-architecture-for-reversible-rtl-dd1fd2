// peres_ripple_adder: WIDTH-bit ripple-carry adder of Peres full adders.
//
// sum = a + b + cin modulo 2^WIDTH, cout is the carry out of the top bit.
// Bit i's carry feeds bit i+1's carry input, as in the source architecture's
// n-bit Peres adder. Used for the butterfly sums when the Peres/TR method is
// selected. The 4-bit default width is this design's choice.
module peres_ripple_adder #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    peres_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1]), .garbage()
    );
  end

  assign cout = carry[WIDTH];
endmodule
