// gf_arith_top: adder/multiplier system over GF(P^m).
//
// Elements of GF(P^m) are vectors of m digits over GF(P) in the standard
// basis (digit v is the coefficient of alpha^v). Three units share the two
// operand inputs f and g:
//   - the adder module gives sum = f + g, combinationally;
//   - the combinational multiplier gives prod_comb = f * g modulo the fixed
//     polynomial X^m + (P-1)(X^(m-1) + ... + 1), combinationally;
//   - the universal multiplier gives prod_univ = f * g modulo the monic
//     polynomial whose low coefficients are on poly, m-1 clocks after start
//     (see gf_mult_univ for the handshake).
// Placing the units side by side is this design's choice; the units
// themselves follow the document.
module gf_arith_top #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [M-1:0][W-1:0] f,
  input  logic [M-1:0][W-1:0] g,
  output logic [M-1:0][W-1:0] sum,
  output logic [M-1:0][W-1:0] prod_comb,
  input  logic [M-1:0][W-1:0] poly,
  input  logic                start,
  output logic                busy,
  output logic                done,
  output logic [M-1:0][W-1:0] prod_univ
);

  gf_adder_module #(.P(P), .M(M)) u_adder (.f(f), .g(g), .a(sum));

  gf_mult_comb #(.P(P), .M(M)) u_mult_comb (.f(f), .g(g), .m_out(prod_comb));

  gf_mult_univ #(.P(P), .M(M)) u_mult_univ (
    .clk(clk), .rst_n(rst_n), .start(start),
    .f(f), .g(g), .poly(poly),
    .busy(busy), .done(done), .m_out(prod_univ)
  );

endmodule
