// tb_gf_mult_univ: self-checking test of the GF(P^m) multiplier with the
// universal control-signal generator, at its default size (P = 3, m = 6).
// Every operation uses a new random monic polynomial (every fourth one the
// fixed polynomial of the combinational method, and one irreducible
// polynomial X^6 + 2X + 2 as a field check). Operands and polynomial are
// scrambled right after start, which the block must tolerate. The result is
// compared with schoolbook multiplication plus long division, and done must
// come m-1 clocks after the start edge.
module tb_gf_mult_univ;
  import gf_ref_pkg::*;
  localparam int unsigned P = 3, M = 6, W = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;

  logic                start, busy, done;
  logic [M-1:0][W-1:0] f, g, poly, m_out;
  gf_mult_univ dut (.clk(clk), .rst_n(rst_n), .start(start), .f(f), .g(g), .poly(poly),
                    .busy(busy), .done(done), .m_out(m_out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input dig_t x, input dig_t y, input dig_t fp);
    dig_t e;
    int   lat;
    for (int i = 0; i < M; i++) begin
      f[i] = W'(x[i]); g[i] = W'(y[i]); poly[i] = W'(fp[i]);
    end
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    f <= '1; g <= '0; poly <= '1;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!done && lat < 20);
    checks++;
    if (lat != M - 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, M - 1);
    end
    e = ref_mul(x, y, fp, P, M);
    checks++;
    for (int i = 0; i < M; i++)
      if (int'(m_out[i]) != e[i]) begin
        failures++;
        $display("M_%0d: got %0d expected %0d", i, m_out[i], e[i]);
        break;
      end
  endtask

  initial begin
    dig_t irr;
    foreach (irr[i]) irr[i] = 0;
    irr[0] = 2; irr[1] = 2;
    start = 1'b0; f = '0; g = '0; poly = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      dig_t fp;
      case (n % 4)
        0:       fp = comb_poly(P);
        1:       fp = irr;
        default: fp = rand_elem(P, M);
      endcase
      op(rand_elem(P, M), rand_elem(P, M), fp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
