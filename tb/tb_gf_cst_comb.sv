// tb_gf_cst_comb: self-checking test of the combinational control-signal
// generator. For random high digits R_m .. R_(2m-2) (low digits zero) the
// control digits must equal the remainder of sum R_w X^w divided by
// X^m + (P-1)(X^(m-1) + ... + 1), computed by long division. Each single
// R_w = 1 is also applied, which exposes every reduction code BCD_w. Default
// size (P = 3, m = 6) and P = 5, m = 4.
module tb_gf_cst_comb;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  localparam int unsigned P2 = 5, M2 = 4, W2 = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-2:0][W-1:0]   r_hi;
  logic [M-1:0][W-1:0]   cst;
  logic [M2-2:0][W2-1:0] r_hi2;
  logic [M2-1:0][W2-1:0] cst2;
  gf_cst_comb dut (.r_hi(r_hi), .cst(cst));
  gf_cst_comb #(.P(P2), .M(M2)) dut2 (.r_hi(r_hi2), .cst(cst2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t w;
    dig_t  e;
    for (int n = 0; n < 3000 + M; n++) begin
      foreach (w[i]) w[i] = 0;
      for (int h = 0; h < M - 1; h++) begin
        w[M+h] = (n < M - 1) ? ((h == n) ? 1 : 0) : $urandom_range(0, P - 1);
        r_hi[h] = W'(w[M+h]);
      end
      @(posedge clk);
      e = ref_reduce(w, comb_poly(P), P, M);
      checks++;
      for (int t = 0; t < M; t++)
        if (int'(cst[t]) != e[t]) begin
          failures++;
          $display("CS_%0d: got %0d expected %0d", t, cst[t], e[t]);
          break;
        end
    end
    for (int n = 0; n < 1000; n++) begin
      foreach (w[i]) w[i] = 0;
      for (int h = 0; h < M2 - 1; h++) begin
        w[M2+h] = $urandom_range(0, P2 - 1);
        r_hi2[h] = W2'(w[M2+h]);
      end
      @(posedge clk);
      e = ref_reduce(w, comb_poly(P2), P2, M2);
      checks++;
      for (int t = 0; t < M2; t++)
        if (int'(cst2[t]) != e[t]) begin
          failures++;
          $display("P=5 CS_%0d: got %0d expected %0d", t, cst2[t], e[t]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
