// rev_wallace_mult: N x N unsigned Wallace tree multiplier in reversible gates.
//
// Three steps. (1) Partial products: N*N Toffoli gates with the third input
// at 0 act as AND gates and form N rows, row i being a & b[i] shifted left by
// i. (2) Wallace reduction: in each stage the rows are taken in groups of
// three; in every column of a group three bits go into a Peres full adder,
// two bits into a Peres half adder, and a single bit passes through. Each
// group becomes a sum row and a carry row (shifted one column left). The
// (height mod 3) rows that do not fill a group pass to the next stage
// unchanged. Heights follow w[j+1] = 2*floor(w[j]/3) + w[j] mod 3, so for
// N = 8 the stages have 6, 4, 3 and 2 rows, and for N = 4 they have 3 and 2.
// (3) The last two rows are added by a ripple of Peres full adders.
//
// Which column holds a bit in which row is worked out at elaboration time
// (the MASK table), so adders are placed only where bits exist. All of this
// follows the reversible Wallace multiplier description; the operands are
// unsigned. Purely combinational: the product settles within one clock
// period of the surrounding filter.
module rev_wallace_mult #(
  parameter int unsigned N = rev_fir_pkg::DATA_W
) (
  input  logic [N-1:0]   a,   // multiplicand (sample)
  input  logic [N-1:0]   b,   // multiplier (coefficient)
  output logic [2*N-1:0] p    // product a*b
);
  localparam int unsigned PW = 2 * N;

  // Matrix height after each reduction stage.
  function automatic int unsigned height(int unsigned stage);
    int unsigned w = N;
    for (int unsigned j = 0; j < stage; j++) w = 2 * (w / 3) + w % 3;
    return w;
  endfunction

  function automatic int unsigned num_stages();
    int unsigned w = N, s = 0;
    while (w > 2) begin
      w = 2 * (w / 3) + w % 3;
      s++;
    end
    return s;
  endfunction

  localparam int unsigned S = num_stages();

  typedef logic [S:0][N-1:0][PW-1:0] mask_t;

  // MASK[s][r][c] = 1 when row r of the matrix before stage s can hold a
  // non-zero bit in column c.
  function automatic mask_t calc_mask();
    mask_t m = '0;
    for (int unsigned i = 0; i < N; i++)
      for (int unsigned c = i; c < i + N; c++) m[0][i][c] = 1'b1;
    for (int unsigned s = 0; s < S; s++) begin
      int unsigned h = height(s);
      int unsigned ng = h / 3;
      for (int unsigned g = 0; g < ng; g++)
        for (int unsigned c = 0; c < PW; c++) begin
          int unsigned n = int'(m[s][3*g][c]) + int'(m[s][3*g+1][c]) + int'(m[s][3*g+2][c]);
          if (n >= 1) m[s+1][2*g][c] = 1'b1;
          if (n >= 2 && c + 1 < PW) m[s+1][2*g+1][c+1] = 1'b1;
        end
      for (int unsigned k = 0; k < h % 3; k++) m[s+1][2*ng+k] = m[s][3*ng+k];
    end
    return m;
  endfunction

  localparam mask_t MASK = calc_mask();

  // rows[s][r]: row r of the matrix before stage s (rows[S] holds the last two).
  logic [S:0][N-1:0][PW-1:0] rows;

  // (1) partial products
  for (genvar i = 0; i < N; i++) begin : g_pp_row
    for (genvar c = 0; c < PW; c++) begin : g_pp_col
      if (c >= i && c < i + N) begin : g_and
        toffoli_gate u_and (.a(a[c-i]), .b(b[i]), .c(1'b0), .p(), .q(), .r(rows[0][i][c]));
      end else begin : g_zero
        assign rows[0][i][c] = 1'b0;
      end
    end
  end

  // (2) reduction stages
  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int unsigned H  = height(s);
    localparam int unsigned HN = height(s + 1);
    localparam int unsigned NG = H / 3;

    logic [NG > 0 ? NG-1 : 0:0][PW-1:0] sm, cy;

    for (genvar g = 0; g < NG; g++) begin : g_grp
      for (genvar c = 0; c < PW; c++) begin : g_col
        localparam int unsigned NB = int'(MASK[s][3*g][c]) + int'(MASK[s][3*g+1][c])
                                   + int'(MASK[s][3*g+2][c]);
        localparam bit M0 = MASK[s][3*g][c];
        localparam bit M1 = MASK[s][3*g+1][c];
        if (NB == 3) begin : g_fa
          peres_fa u_fa (.a(rows[s][3*g][c]), .b(rows[s][3*g+1][c]), .cin(rows[s][3*g+2][c]),
                         .sum(sm[g][c]), .cout(cy[g][c]), .g1(), .g2());
        end else if (NB == 2) begin : g_ha
          // the two present bits of the column
          logic x, y;
          assign x = M0 ? rows[s][3*g][c] : rows[s][3*g+1][c];
          assign y = (M0 && M1) ? rows[s][3*g+1][c] : rows[s][3*g+2][c];
          peres_ha u_ha (.a(x), .b(y), .sum(sm[g][c]), .cout(cy[g][c]), .g());
        end else if (NB == 1) begin : g_pass
          assign sm[g][c] = M0 ? rows[s][3*g][c] : (M1 ? rows[s][3*g+1][c] : rows[s][3*g+2][c]);
          assign cy[g][c] = 1'b0;
        end else begin : g_none
          assign sm[g][c] = 1'b0;
          assign cy[g][c] = 1'b0;
        end
      end
      assign rows[s+1][2*g]   = sm[g];
      assign rows[s+1][2*g+1] = {cy[g][PW-2:0], 1'b0};
    end
    if (NG == 0) begin : g_no_grp
      assign sm = '0;
      assign cy = '0;
    end

    for (genvar k = 0; k < H % 3; k++) begin : g_pass_row
      assign rows[s+1][2*NG+k] = rows[s][3*NG+k];
    end
    for (genvar r = HN; r < N; r++) begin : g_unused_row
      assign rows[s+1][r] = '0;
    end
  end

  // (3) final carry-propagate adder: ripple of Peres full adders
  logic [PW:0] rc;
  assign rc[0] = 1'b0;
  for (genvar c = 0; c < PW; c++) begin : g_cpa
    peres_fa u_fa (.a(rows[S][0][c]), .b(rows[S][1][c]), .cin(rc[c]),
                   .sum(p[c]), .cout(rc[c+1]), .g1(), .g2());
  end
endmodule
