// gf_tgate: the T-gate, a P-input data selector over GF(P).
//
// The output z equals input i_in[k] when the control digit cs equals k
// (k = 0..P-1). It is the basic element of the adder and multiplier cells:
// the A-cell and the mod-P multiplication gate are both a T-gate whose P data
// inputs carry precomputed functions of one operand and whose control is the
// other operand. The document defines the gate with P-valued signals; here
// each digit is a binary number in W bits, and a control value outside
// 0..P-1 (which the design never produces) selects i_in[0].
//
// Purely combinational.
module gf_tgate #(
  parameter int unsigned P = 3,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [P-1:0][W-1:0] i_in,  // data inputs I_0 .. I_(P-1)
  input  logic [W-1:0]        cs,    // control digit CS_j
  output logic [W-1:0]        z      // selected input
);

  always_comb begin
    z = i_in[0];
    for (int unsigned k = 1; k < P; k++) begin
      if (cs == W'(k)) z = i_in[k];
    end
  end

endmodule
