// tb_peres_ha: exhaustive self-check of the Peres half adder.
//
// For all four input pairs, {cout, sum} must equal a + b and the garbage
// output must equal a.
module tb_peres_ha;
  logic a, b, sum, cout, g;
  int checks = 0, failures = 0;

  peres_ha dut (.a(a), .b(b), .sum(sum), .cout(cout), .g(g));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b)) || g !== a) begin
        failures++;
        $display("FAIL a=%0b b=%0b got cout=%0b sum=%0b g=%0b", a, b, cout, sum, g);
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
