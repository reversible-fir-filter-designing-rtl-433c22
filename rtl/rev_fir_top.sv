// rev_fir_top: 8-tap direct-form FIR filter built from reversible gates.
//
// Computes y(n) = sum_{k=0}^{TAPS-1} c_k * x(n-k) on unsigned 8-bit samples
// and unsigned 8-bit coefficients, at full precision (19-bit result, so no
// overflow is possible). The structure is the direct form: a delay line of
// TAPS-1 Fredkin-gate delay elements holds x(n-1)..x(n-TAPS+1), one
// reversible Wallace multiplier per tap forms c_k * x(n-k), and a chain of
// TAPS-1 reversible carry look-ahead adders sums the products. A further
// Fredkin-gate delay element registers the sum.
//
// Interface: x_in is taken when x_valid is 1 at a rising clk edge; the delay
// line then shifts by one sample and, at the same edge, y_out is loaded with
// the filter output for that sample, so y_out/y_valid appear one cycle after
// the sample (latency 1, one sample per cycle at most). When x_valid is 0
// the delay line and y_out hold, and y_valid drops. The coefficients are
// plain inputs (coef[k] is c_k) and must be held steady while samples flow.
// Reset is asynchronous, active low, and clears the delay line and output.
//
// Sizes (8 taps, 8-bit samples and coefficients), the direct form, the
// Wallace multiplier plus carry look-ahead adder pairing and the use of
// Fredkin gates as delay elements follow the filter description. Unsigned
// arithmetic, the full-precision output width, the sample strobe and the
// output register are this design's choices.
module rev_fir_top
  import rev_fir_pkg::*;
#(
  parameter int unsigned NTAPS = TAPS,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned CW    = COEF_W,
  localparam int unsigned AW   = acc_width(DW, CW, NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,    // asynchronous, active low
  input  logic                     x_valid,  // sample strobe
  input  logic [DW-1:0]            x_in,     // x(n)
  input  logic [NTAPS-1:0][CW-1:0] coef,     // c_0 .. c_{NTAPS-1}
  output logic                     y_valid,
  output logic [AW-1:0]            y_out     // y(n)
);
  localparam int unsigned PW = DW + CW;

  if (DW != CW) begin : g_bad_width
    $error("rev_fir_top: the Wallace multiplier is square, DW must equal CW");
  end

  logic [NTAPS-1:0][DW-1:0] tap;   // tap[k] = x(n-k)
  logic [NTAPS-1:0][PW-1:0] prod;  // c_k * x(n-k)
  logic [NTAPS-1:0][AW-1:0] acc;   // running sums along the adder chain

  assign tap[0] = x_in;

  // delay line
  for (genvar k = 1; k < NTAPS; k++) begin : g_delay
    fredkin_delay #(.W(DW)) u_z (
      .clk(clk), .rst_n(rst_n), .en(x_valid), .d(tap[k-1]), .t1(tap[k]), .t2()
    );
  end

  // tap multipliers
  for (genvar k = 0; k < NTAPS; k++) begin : g_mult
    rev_wallace_mult #(.N(DW)) u_mul (.a(tap[k]), .b(coef[k]), .p(prod[k]));
  end

  // adder chain
  assign acc[0] = AW'(prod[0]);
  for (genvar k = 1; k < NTAPS; k++) begin : g_add
    rev_cla #(.W(AW)) u_add (
      .a(acc[k-1]), .b(AW'(prod[k])), .cin(1'b0), .sum(acc[k]), .cout()
    );
  end

  // output register
  fredkin_delay #(.W(AW)) u_yreg (
    .clk(clk), .rst_n(rst_n), .en(x_valid), .d(acc[NTAPS-1]), .t1(y_out), .t2()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= x_valid;
  end
endmodule
