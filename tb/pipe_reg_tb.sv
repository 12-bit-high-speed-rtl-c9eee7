// pipe_reg_tb: self-checking test of pipe_reg at widths 4 (the "4-bit Reg")
// and 1 (the carry DFF). It checks that reset clears the output at once,
// without a clock edge, that q follows d one rising edge later, and that q
// holds between edges. Random data, 200 cycles.
module pipe_reg_tb;
  logic       clk = 1'b0;
  logic       reset = 1'b0;
  logic [3:0] d4, q4;
  logic       d1, q1;
  int         checks = 0, failures = 0;

  pipe_reg #(.W(4)) u4 (.clk, .reset, .d(d4), .q(q4));
  pipe_reg #(.W(1)) u1 (.clk, .reset, .d(d1), .q(q1));

  always #5 clk = ~clk;

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp4;
    logic       exp1;
    reset = 1'b0;
    d4 = 4'hA; d1 = 1'b1;
    @(posedge clk); #1;
    check(q4, 4'hA, "load before reset");
    // asynchronous reset: clears in the middle of a cycle
    reset = 1'b1; #1;
    check(q4, 4'h0, "async reset q4");
    check({3'b0, q1}, 4'h0, "async reset q1");
    @(posedge clk); #1;
    check(q4, 4'h0, "held in reset");
    @(negedge clk); reset = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d4 = 4'($urandom); d1 = 1'($urandom);
      exp4 = d4; exp1 = d1;
      #2;
      // before the edge the old value must still be there
      @(posedge clk); #1;
      check(q4, exp4, "q4 after edge");
      check({3'b0, q1}, {3'b0, exp1}, "q1 after edge");
      d4 = ~d4; #1;
      check(q4, exp4, "q4 holds between edges");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
