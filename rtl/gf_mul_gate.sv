// gf_mul_gate: the mod-P multiplication gate, p = (a * b) mod P.
//
// Built, as in the document, from one T-gate. Data input c of the T-gate
// carries (a * c) mod P, a constant-multiplier lookup on a, and the digit b
// is the T-gate's control. Which operand drives the control is this design's
// choice, made by analogy with the A-cell.
//
// Purely combinational.
module gf_mul_gate #(
  parameter int unsigned P = 3,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [W-1:0] a,  // a_i
  input  logic [W-1:0] b,  // b_j, controls the T-gate
  output logic [W-1:0] p   // (a_i * b_j) mod P
);

  logic [P-1:0][W-1:0] scaled;  // scaled[c] = (a * c) mod P

  for (genvar c = 0; c < P; c++) begin : g_scale
    always_comb begin
      scaled[c] = '0;
      for (int unsigned v = 0; v < P; v++) begin
        if (a == W'(v)) scaled[c] = W'(gf_pkg::mod_mul(v, c, P));
      end
    end
  end

  gf_tgate #(.P(P)) u_tg (.i_in(scaled), .cs(b), .z(p));

endmodule
