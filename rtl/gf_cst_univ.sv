// gf_cst_univ: universal control-signal generator, reduction of the high
// product digits modulo any monic polynomial given at run time.
//
// F(X) = X^m + f_(m-1)X^(m-1) + ... + f_0 is supplied on poly. The block
// computes CS = sum over w = m..2m-2 of R_w * (alpha^w mod F(X)), one term per
// clock, with three register sets:
//   - the R shift register, loaded with R_m .. R_(2m-2), presents R_w and
//     shifts the next one in every clock (R_m first);
//   - the coefficient shift register holds the code of alpha^w. It is loaded
//     with alpha^m = -(f_0 + f_1 alpha + ... + f_(m-1) alpha^(m-1)) and every
//     clock is multiplied by alpha: its digits move up one stage and the
//     digit leaving the top stage is fed back, times -f_t, into every stage t
//     (one M-cell, a multiplication gate and an A-cell, per stage; -f is held in a register loaded with it);
//   - m accumulators C_t, each updated by one M-cell (multiplication gate and A-cell): C_t += R_w * code_t.
// Changing the polynomial changes only the loaded coefficients, not the
// circuit, which is the point of this method. The register arrangement
// follows the document; the feedback details and the timing are this
// design's choices.
//
// Timing: start is sampled at a rising clock edge, which loads the registers
// and clears the accumulators. The next m-1 edges accumulate; the last of them
// raises done for one cycle, and from then cst holds the result until the next
// start. busy is high from the edge after start until that last edge. A start
// while busy restarts the operation. rst_n is asynchronous and active low; the
// assertions at the end also use it, synchronously, to stay quiet in reset.
module gf_cst_univ #(
  parameter int unsigned P = 3,
  parameter int unsigned M = 6,
  localparam int unsigned W = gf_pkg::digit_width(P),
  localparam int unsigned CW = (M > 2) ? $clog2(M - 1) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [M-2:0][W-1:0]  r_hi,   // r_hi[h] = R_(m+h)
  input  logic [M-1:0][W-1:0]  poly,   // f_0 .. f_(m-1)
  output logic                 busy,
  output logic                 done,
  output logic [M-1:0][W-1:0]  cst     // C_0 .. C_(m-1) = CS_0 .. CS_(m-1)
);

  logic [M-2:0][W-1:0] r_sr;   // R shift register, r_sr[0] is the current R_w
  logic [M-1:0][W-1:0] neg_f;  // -f_t mod P
  logic [M-1:0][W-1:0] code;   // alpha^w mod F(X)
  logic [M-1:0][W-1:0] acc;    // accumulators C_t
  logic [CW-1:0]       cnt;    // terms accumulated so far

  logic [M-1:0][W-1:0] code_nx, acc_nx, neg_poly;

  for (genvar t = 0; t < M; t++) begin : g_stage
    // code * alpha: stage t takes stage t-1 plus (top digit) * (-f_t).
    logic [W-1:0] below;
    if (t == 0) begin : g_bottom
      assign below = '0;
    end else begin : g_up
      assign below = code[t-1];
    end
    logic [W-1:0] fb, term;
    gf_mul_gate #(.P(P)) u_fb_mul (.a(code[M-1]), .b(neg_f[t]), .p(fb));
    gf_acell    #(.P(P)) u_fb_add (.a(fb), .b(below), .s(code_nx[t]));
    // C_t + R_w * code_t
    gf_mul_gate #(.P(P)) u_acc_mul (.a(r_sr[0]), .b(code[t]), .p(term));
    gf_acell    #(.P(P)) u_acc_add (.a(term), .b(acc[t]), .s(acc_nx[t]));
    // -f_t mod P, as a lookup on the P legal digit values
    always_comb begin
      neg_poly[t] = '0;
      for (int unsigned v = 0; v < P; v++) begin
        if (poly[t] == W'(v)) neg_poly[t] = W'(gf_pkg::mod_neg(v, P));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_sr  <= '0;
      neg_f <= '0;
      code  <= '0;
      acc   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else if (start) begin
      r_sr  <= r_hi;
      neg_f <= neg_poly;
      code  <= neg_poly;
      acc   <= '0;
      cnt   <= '0;
      busy  <= 1'b1;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        acc  <= acc_nx;
        code <= code_nx;
        r_sr <= r_sr >> W;
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(M - 2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign cst = acc;

  // done is a single-cycle pulse that ends an operation.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
