// tb_gf_cst_univ: self-checking test of the universal control-signal
// generator. Each operation loads random high digits and a random monic
// polynomial (the fixed one of the combinational method included), and
// checks that done comes exactly m-1 clocks after the start edge, that busy is
// high in between, and that the control digits equal the long-division
// remainder. A start issued while busy must restart the operation.
// Default size (P = 3, m = 6) and P = 5, m = 4.
module tb_gf_cst_univ;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  localparam int unsigned P2 = 5, M2 = 4, W2 = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                  start, busy, done;
  logic [M-2:0][W-1:0]   r_hi;
  logic [M-1:0][W-1:0]   poly, cst;
  logic                  start2, busy2, done2;
  logic [M2-2:0][W2-1:0] r_hi2;
  logic [M2-1:0][W2-1:0] poly2, cst2;
  gf_cst_univ dut (.clk(clk), .rst_n(rst_n), .start(start), .r_hi(r_hi), .poly(poly),
                   .busy(busy), .done(done), .cst(cst));
  gf_cst_univ #(.P(P2), .M(M2)) dut2 (.clk(clk), .rst_n(rst_n), .start(start2), .r_hi(r_hi2),
                   .poly(poly2), .busy(busy2), .done(done2), .cst(cst2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation on the default instance. With restart set, a second start
  // with different data is issued two clocks into the first operation.
  task automatic op_default(input bit fixed_poly, input bit restart);
    wide_t w;
    dig_t  f, e;
    int    lat;
    foreach (w[i]) w[i] = 0;
    f = fixed_poly ? comb_poly(P) : rand_elem(P, M);
    for (int h = 0; h < M - 1; h++) begin
      w[M+h] = $urandom_range(0, P - 1);
      r_hi[h] = W'(w[M+h]);
    end
    for (int i = 0; i < M; i++) poly[i] = W'(f[i]);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // Scramble the inputs: they must have been captured.
    r_hi <= '1;
    poly <= '0;
    if (restart) begin
      @(posedge clk);
      f = rand_elem(P, M);
      for (int h = 0; h < M - 1; h++) begin
        w[M+h] = $urandom_range(0, P - 1);
        r_hi[h] <= W'(w[M+h]);
      end
      for (int i = 0; i < M; i++) poly[i] <= W'(f[i]);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
    end
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
      if (!done && !busy) begin
        failures++;
        $display("busy low before done");
        break;
      end
    end while (!done && lat < 20);
    checks++;
    if (lat != M - 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, M - 1);
    end
    e = ref_reduce(w, f, P, M);
    checks++;
    for (int t = 0; t < M; t++)
      if (int'(cst[t]) != e[t]) begin
        failures++;
        $display("CS_%0d: got %0d expected %0d", t, cst[t], e[t]);
        break;
      end
    // The result must hold after done.
    @(posedge clk);
    #1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("busy/done not cleared after the operation");
    end
    for (int t = 0; t < M; t++)
      if (int'(cst[t]) != e[t]) begin
        failures++;
        $display("result not held");
        break;
      end
  endtask

  task automatic op_small();
    wide_t w;
    dig_t  f, e;
    int    lat;
    foreach (w[i]) w[i] = 0;
    f = rand_elem(P2, M2);
    for (int h = 0; h < M2 - 1; h++) begin
      w[M2+h] = $urandom_range(0, P2 - 1);
      r_hi2[h] = W2'(w[M2+h]);
    end
    for (int i = 0; i < M2; i++) poly2[i] = W2'(f[i]);
    start2 <= 1'b1;
    @(posedge clk);
    start2 <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!done2 && lat < 20);
    checks++;
    if (lat != M2 - 1) begin
      failures++;
      $display("P=5 latency %0d, expected %0d", lat, M2 - 1);
    end
    e = ref_reduce(w, f, P2, M2);
    checks++;
    for (int t = 0; t < M2; t++)
      if (int'(cst2[t]) != e[t]) begin
        failures++;
        $display("P=5 CS_%0d: got %0d expected %0d", t, cst2[t], e[t]);
        break;
      end
  endtask

  initial begin
    start = 1'b0; start2 = 1'b0;
    r_hi = '0; poly = '0; r_hi2 = '0; poly2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 1000; n++) op_default(n % 4 == 0, n % 10 == 5);
    for (int n = 0; n < 500; n++) op_small();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
