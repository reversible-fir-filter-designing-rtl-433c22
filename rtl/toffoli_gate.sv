// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// P = A, Q = B, R = AB ^ C. It stands in for the AND gate (C = 0 gives
// R = A & B) and for the XOR gate (A = 1 gives R = B ^ C) throughout the
// filter: partial products of the multiplier and the look-ahead carry
// network of the adder are built from it. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // = b
  output logic r   // = (a & b) ^ c
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
