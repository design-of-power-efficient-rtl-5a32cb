// Toffoli gate (TG): the 3x3 reversible controlled-controlled-NOT gate.
//
// Outputs P = A, Q = B and R = (A & B) ^ C. With C tied to 0 the R output
// is the AND of A and B, which is how the 4x4 multiplier forms each partial
// product bit without discarding its operands. The gate equations follow
// the published design; the port names are this design's own. Purely
// combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,   // = a
  output logic q,   // = b
  output logic r    // = (a & b) ^ c
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
