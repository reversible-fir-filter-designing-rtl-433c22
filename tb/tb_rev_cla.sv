// tb_rev_cla: self-check of the reversible carry look-ahead adder.
//
// Two widths are tested: the 19-bit width the filter uses (not a multiple of
// the 4-bit group, so the padded top group is exercised) and an 8-bit one
// that is checked exhaustively for all a, b and cin. The 19-bit adder gets
// corner cases (all ones, carry rippling through every group) and 20000
// random operand pairs. {cout, sum} must equal a + b + cin.
module tb_rev_cla;
  localparam int unsigned WA = 19;
  localparam int unsigned WB = 8;

  logic [WA-1:0] a1, b1, s1;
  logic          ci1, co1;
  logic [WB-1:0] a2, b2, s2;
  logic          ci2, co2;
  int checks = 0, failures = 0;

  rev_cla #(.W(WA)) dut_a (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  rev_cla #(.W(WB)) dut_b (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  task automatic check_a(logic [WA-1:0] x, logic [WA-1:0] y, logic c);
    logic [WA:0] want;
    a1 = x; b1 = y; ci1 = c;
    #1;
    want = {1'b0, x} + {1'b0, y} + (WA+1)'(c);
    checks++;
    if ({co1, s1} !== want) begin
      failures++;
      $display("FAIL W=%0d %h + %h + %0b = %h, want %h", WA, x, y, c, {co1, s1}, want);
    end
  endtask

  initial begin
    // exhaustive 8-bit
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a2 = WB'(x); b2 = WB'(y); ci2 = c[0];
          #1;
          checks++;
          if ({co2, s2} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=%0d %0d + %0d + %0d = %0d", WB, x, y, c, {co2, s2});
          end
        end
    // 19-bit corners
    check_a('1, '1, 1'b1);
    check_a('1, '0, 1'b1);
    check_a('0, '0, 1'b0);
    check_a(19'h0FFFF, 19'h00001, 1'b0);
    check_a(19'h55555, 19'h2AAAA, 1'b1);
    for (int i = 0; i < 20000; i++) check_a(WA'($urandom), WA'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
