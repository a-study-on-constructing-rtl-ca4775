// tb_gf_cyclic_gate: self-checking test of the mod-P cyclic gate.
// Exhaustive over the input for every shift C = 0..P-1 with P = 3, and for
// C = 1..4 with P = 5; the expected value is (I + C) mod P.
module tb_gf_cyclic_gate;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i3;  logic [2:0][1:0] z3;
  logic [2:0] i5;  logic [4:1][2:0] z5;
  gf_cyclic_gate #(.P(3), .C(0)) d30 (.i_in(i3), .z(z3[0]));
  gf_cyclic_gate #(.P(3), .C(1)) d31 (.i_in(i3), .z(z3[1]));
  gf_cyclic_gate #(.P(3), .C(2)) d32 (.i_in(i3), .z(z3[2]));
  gf_cyclic_gate #(.P(5), .C(1)) d51 (.i_in(i5), .z(z5[1]));
  gf_cyclic_gate #(.P(5), .C(2)) d52 (.i_in(i5), .z(z5[2]));
  gf_cyclic_gate #(.P(5), .C(3)) d53 (.i_in(i5), .z(z5[3]));
  gf_cyclic_gate #(.P(5), .C(4)) d54 (.i_in(i5), .z(z5[4]));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 5; v++) begin
      i3 = 2'(v % 3);
      i5 = 3'(v);
      @(posedge clk);
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(z3[c]) != (v % 3 + c) % 3) begin
          failures++;
          $display("P=3 C=%0d I=%0d Z=%0d", c, v % 3, z3[c]);
        end
      end
      for (int c = 1; c < 5; c++) begin
        checks++;
        if (int'(z5[c]) != (v + c) % 5) begin
          failures++;
          $display("P=5 C=%0d I=%0d Z=%0d", c, v, z5[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
