// csa_pp_array: 16x16 carry-save partial-product array.
//
// Generates all N*N partial products A_j & B_i and reduces them, row by row,
// into a sum vector s and a carry vector c (CS_W = 2N-1 bits each, bit k of
// both with weight 2^k) such that s + c = a * b. Row i holds the products of
// multiplier bit B_i; cell (i, j) sits at weight i+j.
//   Row 0:           AND gates only; they form the first sum row.
//   Column N-1:      AND gates only in every row; each feeds the next row.
//   Row 1:           half adders (MHA) for columns 0..N-2, no carries yet.
//   Rows 2..N-1:     a half adder at column 0 and full adders (MFA) at columns
//                    1..N-2. Cell (i, j) adds its product, the sum of cell
//                    (i-1, j+1) and the carry of cell (i-1, j).
// The sum of column 0 of row k gives s[k]; the carry of column 0 of row k-1
// leaves the array as c[k] instead of entering column 0 of row k. The last row
// gives s[2N-2:N-1] and c[2N-2:N]; c[1:0] are always 0.
// Precision: the cells of the two off-diagonal quadrants (A MSBs with B LSBs,
// and A LSBs with B MSBs) use the precision-gated AND gate. With prec high
// their products are 0, so s + c holds a[N/2-1:0]*b[N/2-1:0] in bits N-1:0
// and a[N-1:N/2]*b[N-1:N/2] in bits 2N-1:N (no carry crosses from one half to
// the other). Combinational. The cell arrangement and quadrant split follow the
// published array diagram; the row clocks of the silicon version only set
// timing and are not modelled here.
module csa_pp_array #(
  parameter int unsigned N = 16,
  localparam int unsigned CS_W = 2 * N - 1
) (
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  input  logic            prec,
  output logic [CS_W-1:0] s,
  output logic [CS_W-1:0] c
);

  localparam int unsigned HALF = N / 2;

  // Sum and carry outputs of every cell (carry stays 0 where there is no adder).
  logic [N-1:0] srow [N];
  logic [N-1:0] crow [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      // Off-diagonal quadrants are the precision-gated ones.
      localparam bit GATED = (i < HALF) != (j < HALF);

      if (i == 0 || j == N - 1) begin : g_and
        pp_and #(.HAS_PREC(GATED)) u_cell (
          .a(a[j]), .b(b[i]), .prec(prec), .y(srow[i][j])
        );
        assign crow[i][j] = 1'b0;
      end else if (i == 1 || j == 0) begin : g_mha
        mha #(.HAS_PREC(GATED)) u_cell (
          .a(a[j]), .b(b[i]), .prec(prec), .y_i(srow[i-1][j+1]),
          .s_o(srow[i][j]), .c_o(crow[i][j])
        );
      end else begin : g_mfa
        mfa #(.HAS_PREC(GATED)) u_cell (
          .a(a[j]), .b(b[i]), .prec(prec),
          .s_i(srow[i-1][j+1]), .c_i(crow[i-1][j]),
          .s_o(srow[i][j]), .c_o(crow[i][j])
        );
      end
    end
  end

  // Right-hand edge: one sum bit per row, and the column-0 carries.
  for (genvar k = 0; k < N - 1; k++) begin : g_right
    assign s[k] = srow[k][0];
  end
  assign c[0] = 1'b0;
  assign c[1] = 1'b0;
  for (genvar k = 2; k < N; k++) begin : g_right_c
    assign c[k] = crow[k-1][0];
  end

  // Bottom edge: the last row.
  for (genvar j = 0; j < N; j++) begin : g_bottom_s
    assign s[N-1+j] = srow[N-1][j];
  end
  for (genvar j = 0; j < N - 1; j++) begin : g_bottom_c
    assign c[N+j] = crow[N-1][j];
  end

endmodule
