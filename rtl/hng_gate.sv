// HNG gate: a 4x4 reversible gate that is a one-bit full adder in a single
// gate.
//
// Outputs P = A, Q = B, R = A ^ B ^ C and S = ((A ^ B) & C) ^ (A & B) ^ D.
// With D tied to 0, A and B carrying the operand bits and C the incoming
// carry, R is the sum bit and S the carry out; P and Q are then garbage
// outputs, kept only so that the mapping stays one-to-one. The equations
// and that use follow the published design; the port names are this
// design's own. Purely combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,   // = a
  output logic q,   // = b
  output logic r,   // = a ^ b ^ c
  output logic s    // = ((a ^ b) & c) ^ (a & b) ^ d
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
