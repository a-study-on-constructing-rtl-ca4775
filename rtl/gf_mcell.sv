// gf_mcell: the M-cell, a GF(P) multiply-accumulate cell of the product array.
//
// r_out = (r_in + a * b) mod P. A mod-P multiplication gate forms a*b and an
// A-cell adds it to the partial sum arriving from the previous cell of the
// same diagonal. The operand digits are passed on unchanged (a_out, b_out),
// so that cells can be abutted into an array in which a runs down a column
// and b runs along a row, as the document draws it.
//
// Purely combinational.
module gf_mcell #(
  parameter int unsigned P = 3,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [W-1:0] a,      // a_i
  input  logic [W-1:0] b,      // b_j
  input  logic [W-1:0] r_in,   // previous-stage R_r
  output logic [W-1:0] a_out,  // a_i to the next cell of the column
  output logic [W-1:0] b_out,  // b_j to the next cell of the row
  output logic [W-1:0] r_out   // next-stage R_r = (R_r + a_i*b_j) mod P
);

  logic [W-1:0] prod;

  gf_mul_gate #(.P(P)) u_mul (.a(a), .b(b), .p(prod));
  gf_acell    #(.P(P)) u_add (.a(prod), .b(r_in), .s(r_out));

  assign a_out = a;
  assign b_out = b;

endmodule
