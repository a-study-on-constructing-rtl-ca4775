// tb_gf_mcell: self-checking test of the M-cell.
// Exhaustive over a, b and the incoming partial sum for P = 3 and P = 5:
// r_out must be (r_in + a*b) mod P and the operands must pass through.
module tb_gf_mcell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a3, b3, r3, ao3, bo3, ro3;
  logic [2:0] a5, b5, r5, ao5, bo5, ro5;
  gf_mcell #(.P(3)) dut3 (.a(a3), .b(b3), .r_in(r3), .a_out(ao3), .b_out(bo3), .r_out(ro3));
  gf_mcell #(.P(5)) dut5 (.a(a5), .b(b5), .r_in(r5), .a_out(ao5), .b_out(bo5), .r_out(ro5));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        for (int r = 0; r < 5; r++) begin
          a5 = 3'(a); b5 = 3'(b); r5 = 3'(r);
          a3 = 2'(a % 3); b3 = 2'(b % 3); r3 = 2'(r % 3);
          @(posedge clk);
          checks += 2;
          if (int'(ro5) != (r + a * b) % 5 || ao5 != a5 || bo5 != b5) begin
            failures++;
            $display("P=5 a=%0d b=%0d r=%0d -> %0d", a, b, r, ro5);
          end
          if (int'(ro3) != (r % 3 + (a % 3) * (b % 3)) % 3 || ao3 != a3 || bo3 != b3) begin
            failures++;
            $display("P=3 a=%0d b=%0d r=%0d -> %0d", a % 3, b % 3, r % 3, ro3);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
