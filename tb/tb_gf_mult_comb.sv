// tb_gf_mult_comb: self-checking test of the combinational GF(P^m)
// multiplier at its default size (P = 3, m = 6, F(X) = X^6 + 2X^5 + ... + 2).
//   - random products against schoolbook multiplication with long division;
//   - multiplying by 1 and by 0;
//   - powers of alpha: starting from 1 and multiplying by alpha must return
//     to 1 after exactly 3^6 - 1 = 728 steps and not before, which holds only
//     if the fixed polynomial is primitive and every reduction is right;
//   - commutativity F*G = G*F through a second instance.
// A second configuration, P = 5, m = 4, gets random products.
module tb_gf_mult_comb;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  localparam int unsigned P2 = 5, M2 = 4, W2 = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0][W-1:0]   f, g, m_out, m_swap;
  logic [M2-1:0][W2-1:0] f2, g2, m2;
  gf_mult_comb dut  (.f(f), .g(g), .m_out(m_out));
  gf_mult_comb dut_swap (.f(g), .g(f), .m_out(m_swap));
  gf_mult_comb #(.P(P2), .M(M2)) dut2 (.f(f2), .g(g2), .m_out(m2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dig_t x, input dig_t y);
    dig_t e;
    for (int i = 0; i < M; i++) begin f[i] = W'(x[i]); g[i] = W'(y[i]); end
    @(posedge clk);
    e = ref_mul(x, y, comb_poly(P), P, M);
    checks++;
    for (int i = 0; i < M; i++)
      if (int'(m_out[i]) != e[i] || m_swap[i] != m_out[i]) begin
        failures++;
        $display("M_%0d: got %0d (swapped %0d) expected %0d", i, m_out[i], m_swap[i], e[i]);
        break;
      end
  endtask

  initial begin
    dig_t x, one, zero, alpha;
    logic [M-1:0][W-1:0] pw, one_v;
    int order;
    foreach (one[i]) begin one[i] = 0; zero[i] = 0; alpha[i] = 0; end
    one[0] = 1;
    alpha[1] = 1;
    for (int n = 0; n < 4000; n++) run(rand_elem(P, M), rand_elem(P, M));
    for (int n = 0; n < 200; n++) begin
      x = rand_elem(P, M);
      run(x, one);
      run(zero, x);
    end
    // Order of alpha.
    one_v = '0;
    one_v[0] = W'(1);
    pw = one_v;
    order = 0;
    for (int i = 0; i < M; i++) g[i] = W'(alpha[i]);
    do begin
      f = pw;
      @(posedge clk);
      pw = m_out;
      order++;
    end while (pw != one_v && order < 1000);
    checks++;
    if (order != 728) begin
      failures++;
      $display("order of alpha %0d, expected 728", order);
    end
    for (int n = 0; n < 1000; n++) begin
      dig_t y, e;
      x = rand_elem(P2, M2);
      y = rand_elem(P2, M2);
      for (int i = 0; i < M2; i++) begin f2[i] = W2'(x[i]); g2[i] = W2'(y[i]); end
      @(posedge clk);
      e = ref_mul(x, y, comb_poly(P2), P2, M2);
      checks++;
      for (int i = 0; i < M2; i++)
        if (int'(m2[i]) != e[i]) begin
          failures++;
          $display("P=5 M_%0d: got %0d expected %0d", i, m2[i], e[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
