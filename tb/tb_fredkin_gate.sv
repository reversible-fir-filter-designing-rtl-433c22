// tb_fredkin_gate: exhaustive self-check of fredkin_gate.
//
// Applies all eight input combinations and compares the three outputs with
// the gate's output functions written out here independently of the module.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic ep, eq, er;
      {a, b, c} = 3'(v);
      #1;
      ep = a; eq = a ? c : b; er = a ? b : c;
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got pqr=%0b%0b%0b want %0b%0b%0b", a, b, c, p, q, r, ep, eq, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
