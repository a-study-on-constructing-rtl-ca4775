// tb_gf_tgate: self-checking test of the T-gate.
// For P = 3 and P = 5, drives random data words and every control value, and
// checks that z equals the input whose index is the control digit.
module tb_gf_tgate;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0][1:0] i3;  logic [1:0] cs3;  logic [1:0] z3;
  logic [4:0][2:0] i5;  logic [2:0] cs5;  logic [2:0] z5;
  gf_tgate #(.P(3)) dut3 (.i_in(i3), .cs(cs3), .z(z3));
  gf_tgate #(.P(5)) dut5 (.i_in(i5), .cs(cs5), .z(z5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 3; k++) i3[k] = 2'($urandom_range(0, 2));
      for (int k = 0; k < 5; k++) i5[k] = 3'($urandom_range(0, 4));
      for (int c = 0; c < 5; c++) begin
        cs3 = 2'(c % 3);
        cs5 = 3'(c);
        @(posedge clk);
        checks += 2;
        if (z3 !== i3[c % 3]) begin
          failures++;
          $display("P=3 cs=%0d z=%0d expected %0d", cs3, z3, i3[c % 3]);
        end
        if (z5 !== i5[c]) begin
          failures++;
          $display("P=5 cs=%0d z=%0d expected %0d", cs5, z5, i5[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
