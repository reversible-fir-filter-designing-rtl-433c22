// tb_rev_fir_top: end-to-end self-check of the reversible FIR filter at its
// default size (8 taps, 8-bit samples and coefficients, 19-bit output).
//
// A reference model kept here (a history of accepted samples and a plain
// multiply-accumulate) predicts every output. The test runs:
//   1. an impulse: the outputs must reproduce the eight coefficients, then 0;
//   2. random samples and coefficients, with the sample strobe dropped at
//      random so that the delay line must hold;
//   3. full-scale input with full-scale coefficients: the largest possible
//      sum, 8 * 255 * 255, must come out exact (no overflow);
//   4. a synthetic speech-like waveform (two triangle tones plus noise,
//      offset-binary around mid-scale) through a low-pass-like symmetric
//      coefficient set.
// Every output must appear exactly one clock after its sample (y_valid one
// cycle after x_valid) and hold while the strobe is low. The mechanisms
// exercised (hold cycles, impulse taps, full-scale results, asynchronous
// reset) are counted, and one that never happened counts as a failure.
module tb_rev_fir_top;
  import rev_fir_pkg::*;

  localparam int unsigned AW = acc_width(DATA_W, COEF_W, TAPS);

  logic                       clk = 1'b0, rst_n = 1'b1, x_valid = 1'b0;
  logic [DATA_W-1:0]          x_in = '0;
  logic [TAPS-1:0][COEF_W-1:0] coef = '0;
  logic                       y_valid;
  logic [AW-1:0]              y_out;

  int checks = 0, failures = 0;
  int n_hold = 0, n_impulse = 0, n_fullscale = 0, n_reset = 0, n_samples = 0;

  logic [DATA_W-1:0] hist [TAPS];   // hist[k] = x(n-k) of the reference model
  logic [AW-1:0]     y_model;       // expected y_out

  rev_fir_top dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .coef(coef),
    .y_valid(y_valid), .y_out(y_out)
  );

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] model_push(logic [DATA_W-1:0] x);
    longint unsigned s = 0;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < TAPS; k++) s += longint'(hist[k]) * longint'(coef[k]);
    return AW'(s);
  endfunction

  // Present one sample (or an idle cycle) and check the cycle after.
  task automatic step(logic v, logic [DATA_W-1:0] x, output logic [AW-1:0] y);
    logic [AW-1:0] y_prev;
    y_prev = y_out;
    @(negedge clk);
    x_valid = v;
    x_in    = x;
    if (v) begin
      y_model = model_push(x);
      n_samples++;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (y_valid !== v) begin
      failures++;
      $display("FAIL y_valid=%0b one cycle after x_valid=%0b", y_valid, v);
    end
    checks++;
    if (v && y_out !== y_model) begin
      failures++;
      $display("FAIL y_out=%0d want %0d (x=%0d)", y_out, y_model, x);
    end else if (!v && y_out !== y_prev) begin
      failures++;
      $display("FAIL y_out changed during hold: %0d -> %0d", y_prev, y_out);
    end
    y = y_out;
  endtask

  task automatic do_reset();
    @(negedge clk);
    x_valid = 1'b0;
    rst_n = 1'b0;
    #3;
    checks++;
    if (y_out !== '0 || y_valid !== 1'b0) begin
      failures++;
      $display("FAIL reset: y_out=%0d y_valid=%0b", y_out, y_valid);
    end
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    y_model = '0;
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    logic [AW-1:0] y;
    int t;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    y_model = '0;

    // 1. impulse response
    for (int k = 0; k < TAPS; k++) coef[k] = COEF_W'(8'd3 + 8'(k * 29));
    do_reset();
    step(1'b1, 8'd1, y);
    for (int k = 0; k < TAPS + 2; k++) begin
      logic [AW-1:0] want;
      want = (k < TAPS) ? AW'(coef[k]) : '0;
      checks++;
      if (y !== want) begin
        failures++;
        $display("FAIL impulse tap %0d: %0d want %0d", k, y, want);
      end else if (k < TAPS) begin
        n_impulse++;
      end
      step(1'b1, 8'd0, y);
    end

    // 2. random samples, random coefficients, random strobe gaps
    for (int k = 0; k < TAPS; k++) coef[k] = COEF_W'($urandom);
    do_reset();
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 3) != 0, DATA_W'($urandom), y);

    // 3. full scale
    for (int k = 0; k < TAPS; k++) coef[k] = '1;
    for (int i = 0; i < TAPS + 2; i++) begin
      step(1'b1, '1, y);
      if (y == AW'(TAPS * 255 * 255)) n_fullscale++;
    end

    // 4. speech-like waveform through a symmetric low-pass-like set
    coef = {8'd4, 8'd18, 8'd47, 8'd64, 8'd64, 8'd47, 8'd18, 8'd4};
    do_reset();
    t = 0;
    for (int i = 0; i < 3000; i++) begin
      int tone1, tone2, s;
      tone1 = (i % 40) < 20 ? (i % 40) * 4 - 40 : 120 - (i % 40) * 4;   // +-40
      tone2 = (i % 7) < 4 ? (i % 7) * 6 - 9 : 33 - (i % 7) * 6;          // small tone
      s = 128 + tone1 * ((i / 500) % 3 + 1) / 2 + tone2 + int'($urandom_range(0, 8)) - 4;
      if (s < 0) s = 0;
      if (s > 255) s = 255;
      step(($urandom_range(0, 9) != 0), DATA_W'(s), y);
    end

    $display("samples=%0d holds=%0d impulse_taps=%0d fullscale=%0d resets=%0d",
             n_samples, n_hold, n_impulse, n_fullscale, n_reset);
    checks++;
    if (n_hold == 0 || n_impulse != TAPS || n_fullscale == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
