// tb_gf_alpha_r_gen: self-checking test of the alpha^r generation module.
// Random operand pairs at the default size (P = 3, m = 6) and at P = 5,
// m = 4; all 2m-1 unreduced product digits are compared with a schoolbook
// polynomial product. Single-digit operands (a_i = 1 alone, b_j = 1 alone)
// check that each cell lands on diagonal i + j.
module tb_gf_alpha_r_gen;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  localparam int unsigned P2 = 5, M2 = 4, W2 = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0][W-1:0]      f, g;
  logic [2*M-2:0][W-1:0]    r;
  logic [M2-1:0][W2-1:0]    f2, g2;
  logic [2*M2-2:0][W2-1:0]  r2;
  gf_alpha_r_gen dut (.f(f), .g(g), .r(r));
  gf_alpha_r_gen #(.P(P2), .M(M2)) dut2 (.f(f2), .g(g2), .r(r2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dig_t x, input dig_t y);
    wide_t e;
    for (int i = 0; i < M; i++) begin f[i] = W'(x[i]); g[i] = W'(y[i]); end
    @(posedge clk);
    e = ref_polymul(x, y, P, M);
    checks++;
    for (int k = 0; k < 2 * M - 1; k++)
      if (int'(r[k]) != e[k]) begin
        failures++;
        $display("R_%0d: got %0d expected %0d", k, r[k], e[k]);
        break;
      end
  endtask

  initial begin
    dig_t x, y;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        foreach (x[k]) begin x[k] = 0; y[k] = 0; end
        x[i] = 1 + (i + j) % 2;
        y[j] = 1 + j % 2;
        run(x, y);
      end
    for (int n = 0; n < 3000; n++) run(rand_elem(P, M), rand_elem(P, M));
    for (int n = 0; n < 1000; n++) begin
      wide_t e;
      x = rand_elem(P2, M2);
      y = rand_elem(P2, M2);
      for (int i = 0; i < M2; i++) begin f2[i] = W2'(x[i]); g2[i] = W2'(y[i]); end
      @(posedge clk);
      e = ref_polymul(x, y, P2, M2);
      checks++;
      for (int k = 0; k < 2 * M2 - 1; k++)
        if (int'(r2[k]) != e[k]) begin
          failures++;
          $display("P=5 R_%0d: got %0d expected %0d", k, r2[k], e[k]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
