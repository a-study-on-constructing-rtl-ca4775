// gf_alpha_r_gen: the alpha^r generation module, the unreduced product of two
// elements of GF(P^m).
//
// An m x m array of M-cells. Cell (i, j) sits in column i, which carries the
// digit a_i of F down the array, and in row j, which carries b_j of G across
// it; it adds a_i*b_j mod P into the running sum of its diagonal i + j = r.
// The sum of a diagonal enters its first cell (smallest j) as 0 and leaves
// its last cell as R_r, so
//     r[r] = R_r = sum over i + j = r of a_i*b_j  (mod P),  r = 0 .. 2m-2.
// R_0 .. R_(m-1) (the alpha^r2 part) are already digits of the result;
// R_m .. R_(2m-2) (the alpha^r1 part) still have to be reduced modulo the
// field polynomial by a control-signal generator. The array and its cell
// numbering follow the document; the order in which a diagonal is chained is
// this design's choice.
//
// The operand digits leaving the last row and the rightmost column (i = 0) are not
// used; they exist only because every cell passes its operands on.
//
// Purely combinational; the longest path runs through m cells.
module gf_alpha_r_gen #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [M-1:0][W-1:0]   f,  // a_0 .. a_(m-1)
  input  logic [M-1:0][W-1:0]   g,  // b_0 .. b_(m-1)
  output logic [2*M-2:0][W-1:0] r   // R_0 .. R_(2m-2)
);

  for (genvar i = 0; i < M; i++) begin : g_col
    for (genvar j = 0; j < M; j++) begin : g_row
      logic [W-1:0] a_i, b_j, r_i;  // entering the cell
      logic [W-1:0] a_o, b_o, r_o;  // leaving the cell
      // a_i enters at row 0 and runs down the column.
      if (j == 0) begin : g_atop
        assign a_i = f[i];
      end else begin : g_ain
        assign a_i = g_col[i].g_row[j-1].a_o;
      end
      // b_j enters at column m-1 (left edge) and runs across the row.
      if (i == M - 1) begin : g_bleft
        assign b_j = g[j];
      end else begin : g_bin
        assign b_j = g_col[i+1].g_row[j].b_o;
      end
      // The diagonal sum comes from cell (i+1, j-1), or starts at 0.
      if (j == 0 || i == M - 1) begin : g_rstart
        assign r_i = '0;
      end else begin : g_rin
        assign r_i = g_col[i+1].g_row[j-1].r_o;
      end
      gf_mcell #(.P(P)) u_cell (
        .a(a_i), .b(b_j), .r_in(r_i), .a_out(a_o), .b_out(b_o), .r_out(r_o)
      );
    end
  end

  // The last cell of diagonal k is (0, k) for k < m and (k-m+1, m-1) beyond.
  for (genvar k = 0; k < 2 * M - 1; k++) begin : g_out
    if (k < M) begin : g_lo
      assign r[k] = g_col[0].g_row[k].r_o;
    end else begin : g_hi
      assign r[k] = g_col[k-M+1].g_row[M-1].r_o;
    end
  end

endmodule
