// peres_fa: full adder made of two cascaded Peres gates.
//
// The first gate (A, B, 0) gives A ^ B and AB. The second gate takes A ^ B,
// the carry-in and AB, and gives Sum = A ^ B ^ Cin and
// Cout = (A ^ B)Cin ^ AB. Each gate leaves one garbage output (G1, G2).
// Combinational.
module peres_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic g1,   // garbage output of the first gate (= a)
  output logic g2    // garbage output of the second gate (= a ^ b)
);
  logic axb, ab;

  peres_gate u_pg1 (.a(a),   .b(b),   .c(1'b0), .p(g1), .q(axb), .r(ab));
  peres_gate u_pg2 (.a(axb), .b(cin), .c(ab),   .p(g2), .q(sum), .r(cout));
endmodule
