// gf_adder_module: the A-module, adder of two elements of GF(P^m).
//
// An element is the vector of its m coefficients over the standard basis
// 1, alpha, ..., alpha^(m-1), one GF(P) digit each (index v = power of
// alpha). Addition has no carries in GF(P^m): each digit position is one
// A-cell, a_out[v] = (f[v] + g[v]) mod P. The same module also forms the
// final sum in the multipliers, where it adds the control signals CS_t to the
// low product digits.
//
// Purely combinational.
module gf_adder_module #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [M-1:0][W-1:0] f,  // F(alpha): digits a_v
  input  logic [M-1:0][W-1:0] g,  // G(alpha): digits b_v
  output logic [M-1:0][W-1:0] a   // A(alpha) = F + G: digits A_v
);

  for (genvar v = 0; v < M; v++) begin : g_cell
    gf_acell #(.P(P)) u_acell (.a(f[v]), .b(g[v]), .s(a[v]));
  end

endmodule
