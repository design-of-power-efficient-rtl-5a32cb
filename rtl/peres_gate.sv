// Peres gate (PG): a 3x3 reversible gate, a Toffoli gate followed by a
// Feynman gate.
//
// Outputs P = A, Q = A ^ B and R = (A & B) ^ C. With C tied to 0 one Peres
// gate is a half adder (Q is the sum, R the carry); two of them chained make
// a full adder (see pg_full_adder). The gate equations follow the published
// design; the port names are this design's own. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = a ^ b
  output logic r    // = (a & b) ^ c
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
