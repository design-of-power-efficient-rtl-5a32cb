// Feynman gate (FG): the 2x2 reversible controlled-NOT gate.
//
// Outputs P = A and Q = A ^ B. The mapping is its own inverse, so no input
// information is lost. With B tied to 0 the gate copies A onto two lines,
// which is how a reversible circuit provides fan-out; with both inputs
// live Q is a plain exclusive OR. The gate equations follow the published
// design; the port names are this design's own. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,   // = a
  output logic q    // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
