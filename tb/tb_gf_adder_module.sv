// tb_gf_adder_module: self-checking test of the GF(P^m) adder module.
// At the default size (P = 3, m = 6) it adds every element to a set of random
// elements and to itself (F + F = 2F) and to its negation (F + (-F) = 0);
// a second instance with P = 5, m = 4 gets random pairs.
module tb_gf_adder_module;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  localparam int unsigned P2 = 5, M2 = 4, W2 = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0][W-1:0]    f, g, a;
  logic [M2-1:0][W2-1:0]  f2, g2, a2;
  gf_adder_module dut (.f(f), .g(g), .a(a));
  gf_adder_module #(.P(P2), .M(M2)) dut2 (.f(f2), .g(g2), .a(a2));

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
    e = ref_add(x, y, P, M);
    checks++;
    for (int i = 0; i < M; i++)
      if (int'(a[i]) != e[i]) begin
        failures++;
        $display("digit %0d: got %0d expected %0d", i, a[i], e[i]);
        break;
      end
  endtask

  initial begin
    dig_t x, y;
    for (int n = 0; n < 729; n++) begin
      int v;
      v = n;
      foreach (x[i]) x[i] = 0;
      for (int i = 0; i < M; i++) begin x[i] = v % 3; v /= 3; end
      run(x, x);
      foreach (y[i]) y[i] = (3 - x[i]) % 3;
      run(x, y);
      run(x, rand_elem(P, M));
    end
    for (int n = 0; n < 500; n++) begin
      dig_t e;
      x = rand_elem(P2, M2);
      y = rand_elem(P2, M2);
      for (int i = 0; i < M2; i++) begin f2[i] = W2'(x[i]); g2[i] = W2'(y[i]); end
      @(posedge clk);
      e = ref_add(x, y, P2, M2);
      checks++;
      for (int i = 0; i < M2; i++)
        if (int'(a2[i]) != e[i]) begin
          failures++;
          $display("P=5 digit %0d: got %0d expected %0d", i, a2[i], e[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
