// ddfs_top_tb: end-to-end test of the synthesizer core at its default size
// (12-bit accumulator, 8-bit phase, 8-bit amplitude).
//
// An ideal accumulator and a sine table computed here serve as reference:
// after rising edge e the phase must equal bits [11:4] of
//   T(e) = sum(fcw at edges 1..e-3) + sum(c_in at edges 1..e-2),
// c_out must flag the step that wraps T, and lut_out must be the sine
// sample of the phase shown one edge earlier. Every cycle is checked.
//
// The run: reset; fcw = 100 (the word of the published simulation) for
// 4096 clocks, where f_out = fcw / 2^12 * f_clk means exactly 100 output
// periods, counted as wraps; a change of word; random words every clock with
// random c_in; a reset during operation. Each mechanism (carry passed
// between slices, wrap, word change, carry-in, reset) is counted and must
// occur at least once.
module ddfs_top_tb;
  logic        clk = 1'b0;
  logic        reset = 1'b0;
  logic [11:0] fcw;
  logic        c_in;
  logic [7:0]  phase, lut_out;
  logic        c_out;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_carry_s0 = 0, n_carry_s1 = 0, n_fcw_change = 0, n_cin = 0, n_reset = 0;

  ddfs_top dut (.clk, .reset, .fcw, .c_in, .phase, .c_out, .lut_out);

  always #5 clk = ~clk;

  longint unsigned f_h[$], c_h[$];
  longint unsigned t_now;          // T(e) mod 4096
  logic [7:0]      prev_phase_ref; // reference phase after edge e-1
  int              e;
  logic [11:0]     last_fcw;

  function automatic logic [7:0] sine_ref(input logic [7:0] p);
    real x;
    x = 127.5 + 127.5 * $sin(6.283185307179586 * real'(p) / 256.0);
    return 8'(int'($floor(x + 0.5)));
  endfunction

  function automatic longint unsigned hist(ref longint unsigned h[$], input int idx);
    return (idx >= 1 && idx < h.size()) ? h[idx] : 64'd0;
  endfunction

  // record every edge out of reset and advance the reference
  always @(posedge clk) begin
    if (!reset) begin
      e++;
      f_h.push_back(64'(fcw)); c_h.push_back(64'(c_in));
      prev_phase_ref = 8'(t_now >> 4);
      t_now = (t_now + hist(f_h, e - 3) + hist(c_h, e - 2)) % 4096;
      if (fcw != last_fcw) n_fcw_change++;
      if (c_in) n_cin++;
      last_fcw = fcw;
    end
  end

  // mechanisms seen inside the accumulator: carries caught between slices
  always @(posedge clk) begin
    if (!reset) begin
      if (dut.u_pa.cdff[0]) n_carry_s0++;
      if (dut.u_pa.cdff[1]) n_carry_s1++;
    end
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at edge %0d: got %0d expected %0d", what, e, got, exp);
    end
  endtask

  task automatic step(input logic [11:0] w, input logic ci);
    longint unsigned nxt;
    @(negedge clk);
    fcw = w; c_in = ci;
    @(posedge clk);
    #1;
    nxt = t_now + hist(f_h, e - 2) + hist(c_h, e - 1);
    check(int'(phase), int'(t_now >> 4), "phase");
    check(int'(c_out), int'(nxt >= 4096), "c_out");
    check(int'(lut_out), int'(sine_ref(prev_phase_ref)), "lut_out");
    if (c_out) n_wrap++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    reset = 1'b1;
    #1;
    check(int'(phase), 0, "phase in reset");
    f_h = {64'd0}; c_h = {64'd0}; e = 0; t_now = 0; prev_phase_ref = 0;
    n_reset++;
    @(negedge clk);
    reset = 1'b0;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps_before;
    fcw = '0; c_in = 1'b0; last_fcw = '0;
    f_h = {64'd0}; c_h = {64'd0}; e = 0; t_now = 0; prev_phase_ref = 0;
    #1 reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;

    // fcw = 100 for 4096 clocks: equation (1) gives 100 output periods
    for (int i = 0; i < 3; i++) step(12'd100, 1'b0);   // fill the pipeline
    wraps_before = n_wrap;
    for (int i = 0; i < 4096; i++) step(12'd100, 1'b0);
    // equation (1) with f_clk = 4096 clocks: periods in 4096 clocks = fcw
    check(n_wrap - wraps_before, int'(ddfs_pkg::f_out(100, 12, 4096.0)), "output periods in 4096 clocks at fcw=100");

    // new word: f_out = 1000/4096 f_clk, 2^12 clocks give 1000 periods
    wraps_before = n_wrap;
    for (int i = 0; i < 4096; i++) step(12'd1000, 1'b0);
    // the first three wraps are still decided by the old word in flight
    checks++;
    if (n_wrap - wraps_before < 997 || n_wrap - wraps_before > 1000) begin
      failures++;
      $display("FAIL %0d periods at fcw=1000", n_wrap - wraps_before);
    end

    // random words every clock, random carry-in
    for (int i = 0; i < 3000; i++) step(12'($urandom), 1'($urandom));
    do_reset();
    for (int i = 0; i < 1000; i++) step(12'($urandom), 1'($urandom));

    $display("wraps %0d, slice-0 carries %0d, slice-1 carries %0d, word changes %0d, carry-ins %0d, resets %0d",
             n_wrap, n_carry_s0, n_carry_s1, n_fcw_change, n_cin, n_reset);
    check(int'(n_wrap > 0), 1, "wrap seen");
    check(int'(n_carry_s0 > 0), 1, "carry from slice 0 seen");
    check(int'(n_carry_s1 > 0), 1, "carry from slice 1 seen");
    check(int'(n_fcw_change > 0), 1, "word change seen");
    check(int'(n_cin > 0), 1, "carry-in seen");
    check(int'(n_reset > 0), 1, "reset in operation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
