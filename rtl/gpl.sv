// gpl: generate/propagate logic cell of the reversible carry look-ahead adder.
//
// A Peres gate fed with (a, b, 0) gives x1 = a, y1 = a ^ b (propagate) and
// z1 = ab (generate). A Toffoli gate fed with (y1, c, z1) then gives
// p = a ^ b, q = c and c1 = (a ^ b)c ^ ab, the carry out of the bit for
// carry-in c. Because generate and propagate can never both be 1, the XOR in
// c1 equals the OR of the usual look-ahead recurrence. The Peres-then-Toffoli
// structure is the source design's; x1 is brought out as a garbage output.
// Combinational.
module gpl (
  input  logic a,
  input  logic b,
  input  logic c,   // carry into this bit
  output logic p,   // propagate, a ^ b
  output logic q,   // = c
  output logic c1,  // carry out of this bit
  output logic x1   // garbage output (= a)
);
  logic y1, z1;

  peres_gate   u_pg (.a(a),  .b(b), .c(1'b0), .p(x1), .q(y1), .r(z1));
  toffoli_gate u_tg (.a(y1), .b(c), .c(z1),   .p(p),  .q(q),  .r(c1));
endmodule
