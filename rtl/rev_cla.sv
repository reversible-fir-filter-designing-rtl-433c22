// rev_cla: W-bit carry look-ahead adder made of reversible gates.
//
// The operands are split into 4-bit groups (the look-ahead logic is kept to
// 4 bits, beyond which its fan-in grows quickly). In every bit a
// generate/propagate cell (gpl: a Peres gate then a Toffoli gate) gives the
// propagate p = a ^ b, and a Toffoli gate used as an AND gives the generate
// g = ab. Each group's look-ahead network forms all four carries at once:
//
//   c[k+1] = g[k] ^ p[k]g[k-1] ^ p[k]p[k-1]g[k-2] ^ ... ^ p[k]..p[0]c[0]
//
// Generate and propagate of one bit are never both 1, so at most one term is
// 1 and the XOR equals the OR of the textbook form; this lets every AND and
// XOR of the network be a Toffoli gate (C = 0 for AND, A = 1 for XOR). The
// sum bit is p ^ c, again a Toffoli gate. Group carries ripple from one
// 4-bit group to the next. The carry-out of each gpl cell, which recomputes
// c[k+1] from c[k], is checked against the look-ahead carry by an assertion.
//
// Using Peres and Toffoli gates for generate/propagate and the 4-bit group
// size follow the adder description; the grouping into a ripple of 4-bit
// look-ahead blocks is this design's choice. Purely combinational.
module rev_cla #(
  parameter int unsigned W = 19
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = (W + 3) / 4;   // number of 4-bit groups
  localparam int unsigned WP = 4 * NG;        // padded width

  logic [WP-1:0] ap, bp, p, g, s, gpl_c1, c_in_bit;
  logic [NG:0]   gc;                          // group carries

  assign ap = WP'(a);
  assign bp = WP'(b);
  assign gc[0] = cin;

  for (genvar gi = 0; gi < NG; gi++) begin : g_grp
    logic [4:0] c;
    assign c[0] = gc[gi];

    for (genvar k = 0; k < 4; k++) begin : g_bit
      localparam int unsigned I = 4 * gi + k;
      gpl          u_gpl (.a(ap[I]), .b(bp[I]), .c(c[k]),
                          .p(p[I]), .q(c_in_bit[I]), .c1(gpl_c1[I]), .x1());
      toffoli_gate u_gen (.a(ap[I]), .b(bp[I]), .c(1'b0), .p(), .q(), .r(g[I]));
      toffoli_gate u_sum (.a(1'b1), .b(p[I]), .c(c_in_bit[I]), .p(), .q(), .r(s[I]));
    end

    // Look-ahead network: carry k+1 of the group from p, g and c[0].
    for (genvar k = 0; k < 4; k++) begin : g_carry
      logic [k+1:0] term;  // term[0]: c[0] path, term[j]: g[j-1] path
      logic [k+1:0] acc;   // running XOR of the terms

      for (genvar j = 0; j <= k + 1; j++) begin : g_term
        // product of the term's source with p[j..k] of this group
        logic [k-j+1:0] pr;
        if (j == 0) begin : g_src_c
          assign pr[0] = c[0];
        end else begin : g_src_g
          assign pr[0] = g[4*gi+j-1];
        end
        for (genvar m = j; m <= k; m++) begin : g_and
          toffoli_gate u_and (.a(pr[m-j]), .b(p[4*gi+m]), .c(1'b0),
                              .p(), .q(), .r(pr[m-j+1]));
        end
        assign term[j] = pr[k-j+1];
      end

      assign acc[0] = term[0];
      for (genvar j = 1; j <= k + 1; j++) begin : g_xor
        toffoli_gate u_xor (.a(1'b1), .b(term[j]), .c(acc[j-1]),
                            .p(), .q(), .r(acc[j]));
      end
      assign c[k+1] = acc[k+1];
    end

    assign gc[gi+1] = c[4];

    // The ripple carry of each gpl cell must agree with the look-ahead carry.
    always_comb begin
      assert (gpl_c1[4*gi +: 4] == c[4:1])
        else $error("rev_cla: look-ahead carry disagrees with gpl carry in group %0d", gi);
    end
  end

  logic [WP:0] full;
  assign full = {gc[NG], s};
  assign {cout, sum} = full[W:0];
endmodule
