// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A ^ B, R = AB ^ C. With C tied to 0 it is a half adder
// (Q = sum, R = carry); two of them in cascade form a full adder. The output
// functions follow the half and full adder realisations of the filter's
// adders. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // = a (garbage output when used as an adder)
  output logic q,  // = a ^ b
  output logic r   // = (a & b) ^ c
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
