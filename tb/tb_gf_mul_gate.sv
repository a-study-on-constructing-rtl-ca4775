// tb_gf_mul_gate: self-checking test of the mod-P multiplication gate: (a * b) mod P.
// Exhaustive over both operand digits for P = 2, 3, 5 and 7.
module tb_gf_mul_gate;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [0:0] a2, b2, z2;
  logic [1:0] a3, b3, z3;
  logic [2:0] a5, b5, z5;
  logic [2:0] a7, b7, z7;
  gf_mul_gate #(.P(2)) dut2 (.a(a2), .b(b2), .p(z2));
  gf_mul_gate #(.P(3)) dut3 (.a(a3), .b(b3), .p(z3));
  gf_mul_gate #(.P(5)) dut5 (.a(a5), .b(b5), .p(z5));
  gf_mul_gate #(.P(7)) dut7 (.a(a7), .b(b7), .p(z7));

  task automatic check(input int p, input int a, input int b, input int z);
    checks++;
    if (z != (a * b) % p) begin
      failures++;
      $display("P=%0d a=%0d b=%0d got %0d expected %0d", p, a, b, z, (a * b) % p);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 7; a++) begin
      for (int b = 0; b < 7; b++) begin
        a2 = 1'(a % 2); b2 = 1'(b % 2);
        a3 = 2'(a % 3); b3 = 2'(b % 3);
        a5 = 3'(a % 5); b5 = 3'(b % 5);
        a7 = 3'(a);     b7 = 3'(b);
        @(posedge clk);
        check(2, a % 2, b % 2, int'(z2));
        check(3, a % 3, b % 3, int'(z3));
        check(5, a % 5, b % 5, int'(z5));
        check(7, a, b, int'(z7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
