// tb_fredkin_delay: self-check of the Fredkin-gate delay element.
//
// Drives random data with a random load enable for 500 cycles after reset
// and keeps its own model of the stored word: after each rising edge t1 must
// hold the last word loaded (or 0 after reset) and t2 its complement. Also
// checks that reset clears the element and that a hold (enable low) keeps
// the old word; both cases are counted and must occur.
module tb_fredkin_delay;
  localparam int unsigned W = 8;

  logic         clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, t1, t2, model;
  int checks = 0, failures = 0, holds = 0, loads = 0;

  fredkin_delay #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .t1(t1), .t2(t2));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (t1 !== model || t2 !== ~model) begin
      failures++;
      $display("FAIL %s: t1=%h t2=%h want %h", what, t1, t2, model);
    end
  endtask

  initial begin
    model = '0;
    #1 rst_n = 1'b0;
    #1 check("reset");
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      d  = W'($urandom);
      @(posedge clk);
      if (en) begin
        model = d;
        loads++;
      end else begin
        holds++;
      end
      #1 check(en ? "load" : "hold");
    end
    // asynchronous reset in mid-cycle
    @(negedge clk);
    en = 1'b1;
    d  = 8'hA5;
    @(posedge clk);
    #1 model = 8'hA5;
    check("load before reset");
    #2 rst_n = 1'b0;
    #1 model = '0;
    check("asynchronous reset");
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL coverage: loads=%0d holds=%0d", loads, holds);
    end
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
