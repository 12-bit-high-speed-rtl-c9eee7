// sine_lut_tb: checks the 256 x 8 sine table. The four quadrant points are
// checked against fixed values (128 at phase 0 and 128, 255 at 64, 0 at 192);
// every entry is checked against a sample computed here, and against the
// symmetry amp(i) + amp(i + 128) = 255 or 256 of an offset-binary sine. It
// also checks the one-clock read latency: the output must not change before
// the clock edge that follows an address change.
module sine_lut_tb;
  logic       clk = 1'b0;
  logic [7:0] phase, amp;
  logic [7:0] table_seen [256];
  int         checks = 0, failures = 0;

  sine_lut #(.AW(8), .DW(8)) dut (.clk, .phase, .amp);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    int  exp, prev;
    phase = 8'd0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prev = int'(amp);
      phase = 8'(i);
      #1;
      if (i > 0) check(int'(amp), prev, "no change before the clock edge");
      @(posedge clk); #1;
      table_seen[i] = amp;
      x   = 127.5 + 127.5 * $sin(6.283185307179586 * real'(i) / 256.0);
      exp = int'($floor(x + 0.5));
      check(int'(amp), exp, $sformatf("entry %0d", i));
    end
    check(int'(table_seen[0]),   128, "phase 0");
    check(int'(table_seen[64]),  255, "phase 64 (peak)");
    check(int'(table_seen[128]), 128, "phase 128");
    check(int'(table_seen[192]), 0,   "phase 192 (trough)");
    for (int i = 1; i < 128; i++) begin
      checks++;
      if (!(int'(table_seen[i]) + int'(table_seen[i+128]) inside {255, 256})) begin
        failures++;
        $display("FAIL symmetry at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
