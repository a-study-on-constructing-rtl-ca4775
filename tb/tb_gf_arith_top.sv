// tb_gf_arith_top: end-to-end test of the GF(P^m) adder/multiplier system at
// its default size (P = 3, m = 6, all 729 field elements).
//
// Every element f is combined with a handful of random elements g:
//   - sum and prod_comb are compared with reference addition and with
//     schoolbook multiplication reduced by X^6 + 2X^5 + ... + 2;
//   - for part of the pairs the universal multiplier is run with a random
//     polynomial, or with the fixed one, in which case prod_univ must also
//     equal prod_comb; its done must come m-1 clocks after start;
//   - some universal operations are restarted while busy.
// The test counts how often each mechanism occurred: a digit sum that wraps
// past P-1, a product whose high digits need reduction, a change of
// polynomial between universal operations, and a restart. Each must occur
// at least once.
module tb_gf_arith_top;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_reduce = 0, n_poly_change = 0, n_restart = 0, n_univ = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic [M-1:0][W-1:0] f, g, sum, prod_comb, poly, prod_univ;
  logic                start, busy, done;

  gf_arith_top dut (
    .clk(clk), .rst_n(rst_n), .f(f), .g(g), .sum(sum), .prod_comb(prod_comb),
    .poly(poly), .start(start), .busy(busy), .done(done), .prod_univ(prod_univ)
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0][W-1:0] to_vec(input dig_t d);
    logic [M-1:0][W-1:0] v;
    for (int i = 0; i < M; i++) v[i] = W'(d[i]);
    return v;
  endfunction

  function automatic bit same(input logic [M-1:0][W-1:0] v, input dig_t d);
    for (int i = 0; i < M; i++) if (int'(v[i]) != d[i]) return 1'b0;
    return 1'b1;
  endfunction

  dig_t last_poly;

  task automatic univ_op(input dig_t x, input dig_t y, input dig_t fp, input bit restart);
    dig_t e;
    int   lat;
    bit   is_comb, changed;
    is_comb = 1'b1;
    changed = 1'b0;
    for (int i = 0; i < M; i++) begin
      if (fp[i] != last_poly[i]) changed = 1'b1;
      if (fp[i] != P - 1) is_comb = 1'b0;
    end
    if (changed) n_poly_change++;
    if (restart) begin
      // Start with other data, then restart one clock later.
      f = to_vec(rand_elem(P, M));
      poly = to_vec(rand_elem(P, M));
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      @(posedge clk);
      #1;
      if (busy) n_restart++;
    end
    f = to_vec(x); g = to_vec(y); poly = to_vec(fp);
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    lat = 0;
    while (!done && lat < 20) begin
      @(posedge clk);
      #1;
      lat++;
    end
    e = ref_mul(x, y, fp, P, M);
    checks++;
    if (lat != M - 1) begin
      failures++;
      $display("universal latency %0d, expected %0d", lat, M - 1);
    end
    checks++;
    if (!same(prod_univ, e)) begin
      failures++;
      $display("prod_univ wrong, f_0=%0d f_1=%0d", fp[0], fp[1]);
    end
    if (is_comb) begin
      f = to_vec(x); g = to_vec(y);
      #1;
      checks++;
      if (prod_univ != prod_comb) begin
        failures++;
        $display("prod_univ differs from prod_comb with the fixed polynomial");
      end
    end
    n_univ++;
    last_poly = fp;
  endtask

  initial begin
    dig_t x, y, es, em, fp;
    wide_t r;
    foreach (last_poly[i]) last_poly[i] = 0;
    start = 1'b0; f = '0; g = '0; poly = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 729; n++) begin
      int v;
      v = n;
      foreach (x[i]) x[i] = 0;
      for (int i = 0; i < M; i++) begin x[i] = v % P; v /= P; end
      for (int k = 0; k < 6; k++) begin
        y = rand_elem(P, M);
        f = to_vec(x); g = to_vec(y);
        @(posedge clk);
        #1;
        es = ref_add(x, y, P, M);
        r  = ref_polymul(x, y, P, M);
        em = ref_reduce(r, comb_poly(P), P, M);
        for (int i = 0; i < M; i++) if (x[i] + y[i] >= P) begin n_wrap++; break; end
        for (int w = M; w < 2 * M - 1; w++) if (r[w] != 0) begin n_reduce++; break; end
        checks += 2;
        if (!same(sum, es)) begin
          failures++;
          $display("sum wrong for f=%0d", n);
        end
        if (!same(prod_comb, em)) begin
          failures++;
          $display("prod_comb wrong for f=%0d", n);
        end
        if (k == 0) begin
          fp = (n % 3 == 0) ? comb_poly(P) : rand_elem(P, M);
          univ_op(x, y, fp, n % 25 == 7);
        end
      end
    end
    $display("mechanisms: digit wrap %0d, reduction %0d, universal ops %0d, polynomial changes %0d, restarts %0d",
             n_wrap, n_reduce, n_univ, n_poly_change, n_restart);
    checks += 4;
    if (n_wrap == 0)        begin failures++; $display("no digit wrap seen"); end
    if (n_reduce == 0)      begin failures++; $display("no reduction seen"); end
    if (n_poly_change == 0) begin failures++; $display("no polynomial change seen"); end
    if (n_restart == 0)     begin failures++; $display("no restart seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
