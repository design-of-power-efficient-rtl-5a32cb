// Reversible ripple-carry adder: one HNG gate per bit.
//
// Bit i is an HNG gate with A = a[i], B = b[i], C = the carry from bit i-1
// (cin for bit 0) and D tied to 0. Its R output is sum[i] and its S output
// the carry into bit i+1; the last carry is cout. The P and Q outputs of
// every gate are garbage, 2*WIDTH bits in all, and come out on the garbage
// port (they equal a and b, bit-interleaved: garbage[2i] = a[i],
// garbage[2i+1] = b[i]). The adder is combinational; its delay grows
// linearly with WIDTH as the carry ripples from bit 0 upwards.
//
// The published design uses an 8-bit adder of eight HNG gates (sixteen
// garbage outputs) in the 8x8 multiplier and mentions a 4-bit version
// built the same way; WIDTH selects between them. The order of the garbage
// bits on the port is this design's own choice.
module rca_hng #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [2*WIDTH-1:0] garbage
);
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a(a[i]),
      .b(b[i]),
      .c(carry[i]),
      .d(1'b0),
      .p(garbage[2*i]),
      .q(garbage[2*i+1]),
      .r(sum[i]),
      .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
