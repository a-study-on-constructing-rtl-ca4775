// gf_acell: the A-cell, a GF(P) digit adder, s = (a + b) mod P.
//
// Following the document, the digit a is passed through P cyclic gates with
// shifts 0..P-1, whose outputs drive the P data inputs of a T-gate; the digit
// b is the T-gate's control, so the gate selects a cyclically shifted by b.
// (The shift-0 gate is a wire.)
//
// Purely combinational.
module gf_acell #(
  parameter int unsigned P = 3,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [W-1:0] a,  // a_i, goes through the cyclic gates
  input  logic [W-1:0] b,  // b_j, controls the T-gate
  output logic [W-1:0] s   // A_k = (a_i + b_j) mod P
);

  logic [P-1:0][W-1:0] shifted;

  for (genvar c = 0; c < P; c++) begin : g_cyc
    gf_cyclic_gate #(.P(P), .C(c)) u_cyc (.i_in(a), .z(shifted[c]));
  end

  gf_tgate #(.P(P)) u_tg (.i_in(shifted), .cs(b), .z(s));

endmodule
