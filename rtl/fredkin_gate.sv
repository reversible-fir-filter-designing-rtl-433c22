// fredkin_gate: 3x3 reversible Fredkin (controlled swap) gate.
//
// A is the control and passes straight through. When A is 0 the data inputs
// B and C pass through unchanged; when A is 1 they are swapped. Written as
// the standard output functions: P = A, Q = A'B ^ AC, R = AB ^ A'C. The gate
// is conservative: the number of ones at the outputs equals that at the
// inputs. Purely combinational, no clock.
module fredkin_gate (
  input  logic a,  // control
  input  logic b,
  input  logic c,
  output logic p,  // = a
  output logic q,  // = a ? c : b
  output logic r   // = a ? b : c
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (a & b) ^ (~a & c);
endmodule
