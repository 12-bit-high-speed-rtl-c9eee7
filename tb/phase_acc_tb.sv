// phase_acc_tb: self-checking test of the pipelined phase accumulator in its
// 12-bit form (3 slices of 4 bits) and its 18-bit form (3 slices of 6 bits).
//
// The reference is an ideal one-cycle accumulator kept in this testbench as
// a running sum of every control word and carry-in captured since reset.
// After rising edge e the accumulator must show
//   T(e) = sum(fcw at edges 1..e-3) + sum(c_in at edges 1..e-2)  (mod 2^N)
// in its upper N-STAGE_W bits, i.e. a latency of three clocks, and c_out
// must be high exactly when the next step wraps T through 2^N.
// Stimulus: a constant word, random words changing every clock, random
// c_in, a reset in the middle of a run and a full-scale word.
module phase_acc_tb;
  localparam int unsigned STAGES = 3;

  logic        clk = 1'b0;
  logic        reset = 1'b0;
  logic [11:0] fcw12;
  logic [17:0] fcw18;
  logic        c_in;
  logic [7:0]  q12;
  logic [11:0] q18;
  logic        co12, co18;

  int checks = 0, failures = 0;
  int wraps12 = 0, wraps18 = 0;

  phase_acc #(.STAGE_W(4), .STAGES(3)) dut12 (
    .clk, .reset, .fcw(fcw12), .c_in, .q(q12), .c_out(co12)
  );
  phase_acc #(.STAGE_W(6), .STAGES(3)) dut18 (
    .clk, .reset, .fcw(fcw18), .c_in, .q(q18), .c_out(co18)
  );

  always #5 clk = ~clk;

  // history since the last reset, index = edge number (index 0 unused)
  longint unsigned f12_h[$], f18_h[$], c_h[$];
  int e;

  function automatic longint unsigned hist(ref longint unsigned h[$], input int idx);
    return (idx >= 1 && idx < h.size()) ? h[idx] : 64'd0;
  endfunction

  function automatic longint unsigned total(ref longint unsigned f[$], ref longint unsigned c[$],
                                           input int edge_no);
    longint unsigned t = 0;
    for (int j = 1; j <= edge_no - int'(STAGES); j++) t += hist(f, j);
    for (int j = 1; j <= edge_no - int'(STAGES) + 1; j++) t += hist(c, j);
    return t;
  endfunction

  task automatic check_all();
    longint unsigned t12, t18, n12, n18;
    bit exp_co12, exp_co18;
    t12 = total(f12_h, c_h, e) % 4096;
    t18 = total(f18_h, c_h, e) % (64'd1 << 18);
    n12 = t12 + hist(f12_h, e + 1 - int'(STAGES)) + hist(c_h, e + 2 - int'(STAGES));
    n18 = t18 + hist(f18_h, e + 1 - int'(STAGES)) + hist(c_h, e + 2 - int'(STAGES));
    exp_co12 = (n12 >= 4096);
    exp_co18 = (n18 >= (64'd1 << 18));
    checks += 4;
    if (q12 != 8'(t12 >> 4)) begin
      failures++;
      $display("FAIL 12-bit q at edge %0d: got %0d expected %0d", e, q12, t12 >> 4);
    end
    if (q18 != 12'(t18 >> 6)) begin
      failures++;
      $display("FAIL 18-bit q at edge %0d: got %0d expected %0d", e, q18, t18 >> 6);
    end
    if (co12 != exp_co12) begin
      failures++;
      $display("FAIL 12-bit c_out at edge %0d: got %0b expected %0b", e, co12, exp_co12);
    end
    if (co18 != exp_co18) begin
      failures++;
      $display("FAIL 18-bit c_out at edge %0d: got %0b expected %0b", e, co18, exp_co18);
    end
    if (co12) wraps12++;
    if (co18) wraps18++;
  endtask

  task automatic clear_history();
    f12_h = {64'd0}; f18_h = {64'd0}; c_h = {64'd0}; e = 0;
  endtask

  // one clock: apply inputs at the falling edge and check the outputs just
  // after the rising edge
  task automatic step(input logic [11:0] w12, input logic [17:0] w18, input logic ci);
    @(negedge clk);
    fcw12 = w12; fcw18 = w18; c_in = ci;
    @(posedge clk);
    #1 check_all();
  endtask

  // every rising edge out of reset is recorded, stepped or not
  always @(posedge clk) begin
    if (!reset) begin
      e++;
      f12_h.push_back(64'(fcw12)); f18_h.push_back(64'(fcw18)); c_h.push_back(64'(c_in));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw12 = '0; fcw18 = '0; c_in = 1'b0;
    #1 reset = 1'b1;
    clear_history();
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    // a constant word; 100 is the value shown in the published simulation
    for (int i = 0; i < 300; i++) step(12'd100, 18'd100 * 64, 1'b0);
    // words that change every clock exercise the input skew registers
    for (int i = 0; i < 2000; i++) step(12'($urandom), 18'($urandom), 1'b0);
    // random carry-in as well
    for (int i = 0; i < 2000; i++) step(12'($urandom), 18'($urandom), 1'($urandom));
    // reset in the middle of a run
    @(negedge clk) reset = 1'b1;
    #1;
    checks++;
    if (q12 != 0 || q18 != 0) begin
      failures++;
      $display("FAIL reset does not clear the outputs");
    end
    clear_history();
    @(negedge clk) reset = 1'b0;
    // full-scale word with carry-in: every step adds exactly 2^N
    for (int i = 0; i < 50; i++) step(12'hFFF, 18'h3FFFF, 1'b1);
    for (int i = 0; i < 500; i++) step(12'($urandom), 18'($urandom), 1'($urandom));
    checks += 2;
    if (wraps12 == 0) begin failures++; $display("FAIL 12-bit accumulator never wrapped"); end
    if (wraps18 == 0) begin failures++; $display("FAIL 18-bit accumulator never wrapped"); end
    $display("12-bit wraps %0d, 18-bit wraps %0d", wraps12, wraps18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
