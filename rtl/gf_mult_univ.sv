// gf_mult_univ: GF(P^m) multiplier for a field polynomial given at run time,
// built with the universal control-signal generator.
//
// The alpha^r generation module forms R_0 .. R_(2m-2) combinationally from f
// and g. On start, the high digits R_m .. R_(2m-2) and the polynomial are
// loaded into the universal control-signal generator, and the low digits
// R_0 .. R_(m-1) into a register, so f, g and poly may change once start has
// been sampled. After m-1 further clocks the generator's control digits are
// ready; the adder module adds them to the held low digits,
// M_k = (R_k + CS_k) mod P.
//
// Timing: start sampled at edge 0; done pulses after edge m-1; m_out is valid
// from done until the next start. poly gives f_0 .. f_(m-1) of the monic
// F(X) = X^m + f_(m-1)X^(m-1) + ... + f_0; the result is F*G mod F(X) for any
// such polynomial, and a field product when F(X) is irreducible.
module gf_mult_univ #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [M-1:0][W-1:0] f,      // F(alpha)
  input  logic [M-1:0][W-1:0] g,      // G(alpha)
  input  logic [M-1:0][W-1:0] poly,   // f_0 .. f_(m-1) of F(X)
  output logic                busy,
  output logic                done,
  output logic [M-1:0][W-1:0] m_out   // M(alpha) = F * G mod F(X)
);

  logic [2*M-2:0][W-1:0] r;
  logic [M-1:0][W-1:0]   r_lo_q;
  logic [M-1:0][W-1:0]   cst;

  gf_alpha_r_gen #(.P(P), .M(M)) u_alpha (.f(f), .g(g), .r(r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     r_lo_q <= '0;
    else if (start) r_lo_q <= r[M-1:0];
  end

  gf_cst_univ #(.P(P), .M(M)) u_cst (
    .clk(clk), .rst_n(rst_n), .start(start),
    .r_hi(r[2*M-2:M]), .poly(poly),
    .busy(busy), .done(done), .cst(cst)
  );

  gf_adder_module #(.P(P), .M(M)) u_add (.f(r_lo_q), .g(cst), .a(m_out));

endmodule
