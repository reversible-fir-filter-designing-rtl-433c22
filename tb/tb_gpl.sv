// tb_gpl: exhaustive self-check of the generate/propagate cell.
//
// For all eight input combinations: p must be a ^ b, q must repeat the
// carry-in, c1 must be the carry out of a + b + c (the majority function),
// and x1 must be a.
module tb_gpl;
  logic a, b, c, p, q, c1, x1;
  int checks = 0, failures = 0;

  gpl dut (.a(a), .b(b), .c(c), .p(p), .q(q), .c1(c1), .x1(x1));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic maj;
      {a, b, c} = 3'(v);
      #1;
      maj = (int'(a) + int'(b) + int'(c)) >= 2;
      checks++;
      if (p !== (a != b) || q !== c || c1 !== maj || x1 !== a) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got p=%0b q=%0b c1=%0b x1=%0b", a, b, c, p, q, c1, x1);
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
