// tb_rev_fir_orders: the reversible FIR filter at other filter orders.
//
// The filter is parameterised in its number of taps. This test builds a
// 4-tap and a 16-tap instance side by side, feeds both the same random
// offset-binary samples with random strobe gaps for 3000 cycles, each with
// its own random coefficients, and compares every output (value, one-cycle
// latency, hold while the strobe is low) with a multiply-accumulate model
// kept here. The output width grows with the tap count (18 and 20 bits);
// a full-scale burst checks that neither instance overflows.
module tb_rev_fir_orders;
  localparam int unsigned T4 = 4, T16 = 16;
  localparam int unsigned AW4 = 8 + 8 + 2, AW16 = 8 + 8 + 4;

  logic clk = 1'b0, rst_n = 1'b1, x_valid = 1'b0;
  logic [7:0] x_in = '0;
  logic [T4-1:0][7:0]  coef4 = '0;
  logic [T16-1:0][7:0] coef16 = '0;
  logic y_valid4, y_valid16;
  logic [AW4-1:0]  y4;
  logic [AW16-1:0] y16;

  int checks = 0, failures = 0, n_hold = 0, n_full = 0;
  logic [7:0] hist [T16];

  rev_fir_top #(.NTAPS(T4))  dut4  (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
                                    .coef(coef4), .y_valid(y_valid4), .y_out(y4));
  rev_fir_top #(.NTAPS(T16)) dut16 (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
                                    .coef(coef16), .y_valid(y_valid16), .y_out(y16));

  always #5 clk = ~clk;

  function automatic longint unsigned mac4();
    longint unsigned s = 0;
    for (int k = 0; k < T4; k++) s += longint'(hist[k]) * longint'(coef4[k]);
    return s;
  endfunction

  function automatic longint unsigned mac16();
    longint unsigned s = 0;
    for (int k = 0; k < T16; k++) s += longint'(hist[k]) * longint'(coef16[k]);
    return s;
  endfunction

  task automatic step(logic v, logic [7:0] x);
    logic [AW4-1:0]  p4;
    logic [AW16-1:0] p16;
    p4 = y4;
    p16 = y16;
    @(negedge clk);
    x_valid = v;
    x_in = x;
    if (v) begin
      for (int k = T16 - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    checks += 2;
    if (y_valid4 !== v || y_valid16 !== v) begin
      failures++;
      $display("FAIL y_valid %0b/%0b after x_valid=%0b", y_valid4, y_valid16, v);
    end
    if (v) begin
      if (y4 !== AW4'(mac4()) || y16 !== AW16'(mac16())) begin
        failures++;
        $display("FAIL y4=%0d want %0d, y16=%0d want %0d", y4, mac4(), y16, mac16());
      end
    end else if (y4 !== p4 || y16 !== p16) begin
      failures++;
      $display("FAIL outputs changed while strobe low");
    end
  endtask

  initial begin
    for (int k = 0; k < T16; k++) hist[k] = '0;
    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int k = 0; k < T4; k++) coef4[k] = 8'($urandom);
    for (int k = 0; k < T16; k++) coef16[k] = 8'($urandom);
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 4) != 0, 8'($urandom));
    coef4 = '1;
    coef16 = '1;
    for (int i = 0; i < T16 + 1; i++) begin
      step(1'b1, 8'hFF);
      if (y16 == AW16'(T16 * 255 * 255)) n_full++;
    end
    checks++;
    if (n_hold == 0 || n_full == 0 || y4 != AW4'(T4 * 255 * 255)) begin
      failures++;
      $display("FAIL coverage: holds=%0d full-scale=%0d y4=%0d", n_hold, n_full, y4);
    end
    $display("holds=%0d full-scale=%0d", n_hold, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
