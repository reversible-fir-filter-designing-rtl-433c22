// tb_peres_fa: exhaustive self-check of the two-Peres-gate full adder.
//
// For all eight input combinations, {cout, sum} must equal a + b + cin; the
// garbage outputs must be a (first gate) and a ^ b (second gate).
module tb_peres_fa;
  logic a, b, cin, sum, cout, g1, g2;
  int checks = 0, failures = 0;

  peres_fa dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .g1(g1), .g2(g2));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin)) || g1 !== a || g2 !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b sum=%0b g1=%0b g2=%0b",
                 a, b, cin, cout, sum, g1, g2);
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
