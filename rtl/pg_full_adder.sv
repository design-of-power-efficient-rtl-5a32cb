// One-bit reversible full adder made of two Peres gates.
//
// The first gate, PG(x, y, 0), gives x ^ y and x & y. The second,
// PG(x ^ y, cin, x & y), gives the sum x ^ y ^ cin on its Q output and the
// carry ((x ^ y) & cin) ^ (x & y) on its R output. Its P output (x ^ y) and
// the first gate's copy of x are garbage. The 4x4 multiplier uses it to add
// up the bits of each crosswise column. Only that the multiplier is built
// from Peres and Toffoli gates is published; this two-gate arrangement is
// the usual one and this design's choice. Purely combinational.
module pg_full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g0, g1, xy_x, xy_a;

  peres_gate u_pg0 (.a(x),    .b(y),   .c(1'b0), .p(g0), .q(xy_x), .r(xy_a));
  peres_gate u_pg1 (.a(xy_x), .b(cin), .c(xy_a), .p(g1), .q(sum),  .r(cout));

  // The garbage outputs of a reversible circuit carry no result.
  logic unused_garbage;
  assign unused_garbage = g0 ^ g1;
endmodule
