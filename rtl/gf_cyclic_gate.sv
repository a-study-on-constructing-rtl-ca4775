// gf_cyclic_gate: the mod-P cyclic gate, z = (i_in + C) mod P.
//
// C is a constant fixed at elaboration (the document uses 1..P-1; C = 0 is
// accepted as a plain connection so that the A-cell can instantiate one gate
// per T-gate input). The gate is a lookup on the P legal input values; an
// input outside 0..P-1, which the design never produces, gives 0.
//
// Purely combinational.
module gf_cyclic_gate #(
  parameter int unsigned P = 3,
  parameter int unsigned C = 1,
  localparam int unsigned W = gf_pkg::digit_width(P)
) (
  input  logic [W-1:0] i_in,  // input digit I
  output logic [W-1:0] z      // (I + C) mod P
);

  always_comb begin
    z = '0;
    for (int unsigned v = 0; v < P; v++) begin
      if (i_in == W'(v)) z = W'(gf_pkg::mod_add(v, C, P));
    end
  end

endmodule
