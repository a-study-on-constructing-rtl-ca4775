// gf_cst_comb: combinational control-signal generator for a fixed field
// polynomial.
//
// The high product digits R_m .. R_(2m-2) stand for alpha^m .. alpha^(2m-2),
// which lie outside the standard basis. With the field polynomial
//     F(X) = X^m + (P-1)X^(m-1) + ... + (P-1)X + (P-1),
// the type this method requires, alpha^m = 1 + alpha + ... + alpha^(m-1), and
// every alpha^w reduces to a fixed digit code BCD_w. The control signals are
//     CS_t = sum over w = m..2m-2 of R_w * BCD_w[t]   (mod P),  t = 0..m-1,
// and the multiplier adds CS_t to R_t. The codes are computed at elaboration
// by bcd_digit(); each term is one M-cell (a multiplication gate and an
// A-cell) whose b input is a constant digit, and the terms of one output
// digit are chained into a sum. The low digits
// R_0 .. R_(m-1) are not used here.
//
// Purely combinational. Needs M >= 2.
module gf_cst_comb #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [M-2:0][W-1:0] r_hi,  // r_hi[h] = R_(m+h)
  output logic [M-1:0][W-1:0] cst    // CS_0 .. CS_(m-1)
);

  // Digit t of alpha^w mod F(X). Starting from alpha^0, each step multiplies
  // by alpha: the digits move up one place and the digit leaving the top,
  // times alpha^m = 1 + alpha + ... + alpha^(m-1), is added to every place.
  function automatic int unsigned bcd_digit(input int unsigned w, input int unsigned t);
    logic [M-1:0][15:0] v;
    logic [15:0] top;
    v = '0;
    v[0] = 16'd1;
    for (int unsigned s = 0; s < w; s++) begin
      top = v[M-1];
      for (int k = M - 1; k > 0; k--) v[k] = 16'((32'(v[k-1]) + 32'(top)) % P);
      v[0] = 16'(32'(top) % P);
    end
    return int'(v[t]);
  endfunction

  for (genvar t = 0; t < M; t++) begin : g_digit
    logic [W-1:0] chain [M];  // chain[0] = 0, chain[h+1] after term R_(m+h)
    assign chain[0] = '0;
    for (genvar h = 0; h < M - 1; h++) begin : g_term
      localparam int unsigned CODE = bcd_digit(M + h, t);
      logic [W-1:0] prod;
      gf_mul_gate #(.P(P)) u_mul (.a(r_hi[h]), .b(W'(CODE)), .p(prod));
      gf_acell    #(.P(P)) u_add (.a(prod), .b(chain[h]), .s(chain[h+1]));
    end
    assign cst[t] = chain[M-1];
  end

endmodule
