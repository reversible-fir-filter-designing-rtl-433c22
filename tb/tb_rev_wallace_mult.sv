// tb_rev_wallace_mult: self-check of the reversible Wallace tree multiplier.
//
// The 8x8 multiplier used by the filter is checked exhaustively (all 65536
// operand pairs); a 4x4 instance (two reduction stages) is also checked
// exhaustively. The product must equal a * b.
module tb_rev_wallace_mult;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  rev_wallace_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  rev_wallace_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8: %0d * %0d = %0d", x, y, p8);
        end
        if (x < 16 && y < 16) begin
          checks++;
          if (p4 !== 8'(x * y)) begin
            failures++;
            if (failures < 10) $display("FAIL 4x4: %0d * %0d = %0d", x, y, p4);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
