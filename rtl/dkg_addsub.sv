// dkg_addsub: programmable WIDTH-bit ripple adder/subtractor of DKG gates.
//
// Bit i is one dkg_gate fed (mode, x[i], y[i], carry[i]); its c output is
// the carry (mode 0) or borrow (mode 1) into bit i+1 and its d output is
// sd[i]. So mode 0 gives sd = x + y + cin and mode 1 gives sd = x - y - cin,
// both modulo 2^WIDTH, with cout the final carry or borrow. The two garbage
// outputs of every gate are brought out on `garbage`. This is the source
// architecture's 4-bit adder/subtractor; the FFT instantiates it at its own
// word width. Purely combinational.
module dkg_addsub #(
  parameter int WIDTH = 4
) (
  input  logic               mode,
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  input  logic               cin,
  output logic [WIDTH-1:0]   sd,
  output logic               cout,
  output logic [2*WIDTH-1:0] garbage
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    dkg_gate u_dkg (
      .p(mode), .q(x[i]), .r(y[i]), .s(carry[i]),
      .a(garbage[2*i]), .b(garbage[2*i+1]), .c(carry[i+1]), .d(sd[i])
    );
  end

  assign cout = carry[WIDTH];
endmodule
