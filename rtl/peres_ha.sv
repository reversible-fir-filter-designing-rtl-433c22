// peres_ha: half adder made of one Peres gate.
//
// The gate's third input is tied to the constant 0, so Q = A ^ B is the sum
// and R = AB is the carry; P = A is a garbage output, brought out so the
// gate keeps as many outputs as inputs. Combinational.
module peres_ha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout,
  output logic g    // garbage output (= a)
);
  peres_gate u_pg (.a(a), .b(b), .c(1'b0), .p(g), .q(sum), .r(cout));
endmodule
