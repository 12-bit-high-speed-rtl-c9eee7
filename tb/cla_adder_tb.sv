// cla_adder_tb: exhaustive test of the 4-bit carry-lookahead adder. All
// 16 x 16 x 2 operand and carry-in combinations are applied and the sum and
// carry out are compared with integer addition. A 6-bit instance is also
// driven with random operands to exercise the width parameter (the 18-bit
// accumulator uses 6-bit slices).
module cla_adder_tb;
  logic [3:0] a, b, s;
  logic       ci, co;
  logic [5:0] a6, b6, s6;
  logic       ci6, co6;
  int         checks = 0, failures = 0;
  logic       clk = 1'b0;

  cla_adder #(.W(4)) dut  (.a, .b, .c_in(ci), .sum(s), .c_out(co));
  cla_adder #(.W(6)) dut6 (.a(a6), .b(b6), .c_in(ci6), .sum(s6), .c_out(co6));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int c = 0; c < 2; c++) begin
          a = 4'(i); b = 4'(j); ci = 1'(c);
          #1;
          exp = i + j + c;
          checks++;
          if ({co, s} != 5'(exp)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got %0d expected %0d", i, j, c, {co, s}, exp);
          end
        end
    for (int n = 0; n < 500; n++) begin
      a6 = 6'($urandom); b6 = 6'($urandom); ci6 = 1'($urandom);
      #1;
      exp = int'(a6) + int'(b6) + int'(ci6);
      checks++;
      if ({co6, s6} != 7'(exp)) begin
        failures++;
        $display("FAIL W=6 %0d + %0d + %0d: got %0d", a6, b6, ci6, {co6, s6});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
