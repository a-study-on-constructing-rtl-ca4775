// gf_mult_comb: GF(P^m) multiplier with the combinational control-signal
// generator.
//
// Three modules in a row, as in the document's multiplier:
//   1. the alpha^r generation module forms the unreduced product digits
//      R_0 .. R_(2m-2);
//   2. the combinational control-signal generator reduces the alpha^r1 part
//      R_m .. R_(2m-2) into control digits CS_0 .. CS_(m-1);
//   3. the adder module adds them to the alpha^r2 part:
//      M_k = (R_k + CS_k) mod P.
// The field polynomial is fixed to X^m + (P-1)(X^(m-1) + ... + X + 1). With
// the defaults P = 3, m = 6 it is irreducible and primitive, so the block is
// a true GF(3^6) multiplier.
//
// Purely combinational.
module gf_mult_comb #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [M-1:0][W-1:0] f,      // F(alpha)
  input  logic [M-1:0][W-1:0] g,      // G(alpha)
  output logic [M-1:0][W-1:0] m_out   // M(alpha) = F * G mod F(X)
);

  logic [2*M-2:0][W-1:0] r;
  logic [M-1:0][W-1:0]   cst;

  gf_alpha_r_gen  #(.P(P), .M(M)) u_alpha (.f(f), .g(g), .r(r));
  gf_cst_comb     #(.P(P), .M(M)) u_cst   (.r_hi(r[2*M-2:M]), .cst(cst));
  gf_adder_module #(.P(P), .M(M)) u_add   (.f(r[M-1:0]), .g(cst), .a(m_out));

endmodule
