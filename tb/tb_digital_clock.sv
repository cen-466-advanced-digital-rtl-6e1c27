// End-to-end testbench of digital_clock at a 2 MHz board clock (the rates keep their
// ratios, so 1 Hz is one tick per 2e6 cycles).
//
// A monitor reads the six displays every cycle, decodes them with reference glyphs, and
// checks that the time only ever moves to its successor (modulo 20 hours, as the hours
// run 00..19), and that in a rate mode consecutive steps are exactly one period of that
// rate apart. The stimulus:
//   1. reset, then step mode: one full 20-hour cycle of button presses, through every
//      wrap of every digit and back to 00:00:00;
//   2. 10 kHz, 100 Hz and 1 Hz time bases in turn;
//   3. a reset in the middle of counting, which must return the display to 00:00:00.
// Every mechanism (each digit's wrap, each time base, button steps, reset) is counted and
// must have happened at least once.
module tb_digital_clock;
  import clock_pkg::*;
  import seg_ref_pkg::*;

  localparam int unsigned IN_HZ     = 2_000_000;
  localparam int unsigned DAY       = 20 * 3600;        // hours 00..19
  localparam int unsigned P_10KHZ   = IN_HZ / 10_000;
  localparam int unsigned P_100HZ   = IN_HZ / 100;
  localparam int unsigned P_1HZ     = IN_HZ;
  localparam int unsigned N_10KHZ   = 4000;
  localparam int unsigned N_100HZ   = 5;
  localparam int unsigned N_1HZ     = 2;

  logic clk = 1'b0, reset, step_btn;
  timebase_e tick_sel;
  seg7_t second0, second1, minute0, minute1, hour0, hour1;

  digital_clock #(.IN_HZ(IN_HZ)) dut (
    .clk(clk), .reset(reset), .tick_sel(tick_sel), .step_btn(step_btn),
    .second0(second0), .second1(second1), .minute0(minute0), .minute1(minute1),
    .hour0(hour0), .hour1(hour1)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  // Watchdog: far beyond the longest phase (the 1 Hz steps).
  initial begin
    repeat (6 * IN_HZ + 4 * DAY * 8 + 40 * P_10KHZ * N_10KHZ) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- display monitor ----------------
  int          shown;              // decoded time in seconds, -1 if not a valid time
  int          prev_shown = -1;
  longint      last_step_cycle = -1;
  int unsigned expect_period = 0;  // 0: do not check the spacing of steps
  bit          resync = 1'b1;      // next step starts a new spacing measurement
  bit          in_reset = 1'b1;
  int unsigned steps = 0;
  int unsigned mode_steps [4];
  int unsigned wrap_s0 = 0, wrap_s1 = 0, wrap_m0 = 0, wrap_m1 = 0, wrap_h0 = 0, wrap_day = 0;
  int unsigned resets_seen = 0;

  function automatic int decode_time();
    int d [6];
    d[0] = digit_of(second0); d[1] = digit_of(second1);
    d[2] = digit_of(minute0); d[3] = digit_of(minute1);
    d[4] = digit_of(hour0);   d[5] = digit_of(hour1);
    if (d[0] < 0 || d[0] > 9 || d[1] < 0 || d[1] > 5 || d[2] < 0 || d[2] > 9 ||
        d[3] < 0 || d[3] > 5 || d[4] < 0 || d[4] > 9 || d[5] < 0 || d[5] > 1)
      return -1;
    return ((d[5] * 10 + d[4]) * 60 + d[3] * 10 + d[2]) * 60 + d[1] * 10 + d[0];
  endfunction

  logic [41:0] segs_now, segs_prev = '1;

  always @(negedge clk) begin
    cycle++;
    // Decode only when some segment changed; otherwise the time shown is unchanged.
    segs_now = {hour1, hour0, minute1, minute0, second1, second0};
    if (segs_now != segs_prev) shown = decode_time();
    segs_prev = segs_now;
    if (!in_reset) begin
      if (shown < 0) begin
        checks++;
        failures++;
        if (failures < 20) $display("FAIL cycle %0d: display is no valid time", cycle);
      end else if (shown != prev_shown) begin
        checks++;
        if (shown != (prev_shown + 1) % DAY) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d: time went from %0d to %0d", cycle, prev_shown, shown);
        end
        if (expect_period != 0 && !resync) begin
          checks++;
          if (cycle - last_step_cycle != expect_period) begin
            failures++;
            if (failures < 20)
              $display("FAIL cycle %0d: step after %0d cycles, expected %0d",
                       cycle, cycle - last_step_cycle, expect_period);
          end
        end
        resync = 1'b0;
        last_step_cycle = cycle;
        steps++;
        mode_steps[tick_sel]++;
        if (shown % 10 == 0)    wrap_s0++;
        if (shown % 60 == 0)    wrap_s1++;
        if (shown % 600 == 0)   wrap_m0++;
        if (shown % 3600 == 0)  wrap_m1++;
        if (shown % 36000 == 0) wrap_h0++;
        if (shown == 0)         wrap_day++;
      end
    end
    prev_shown = shown;
  end

  // ---------------- stimulus ----------------
  task automatic do_reset();
    @(negedge clk);
    in_reset = 1'b1;
    reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    checks++;
    if (decode_time() != 0) begin
      failures++;
      $display("FAIL after reset the display shows %0d, not 00:00:00", decode_time());
    end
    resets_seen++;
    prev_shown = 0;
    resync = 1'b1;
    in_reset = 1'b0;
  endtask

  task automatic wait_steps(int unsigned n);
    int unsigned target = steps + n;
    while (steps < target) @(negedge clk);
  endtask

  task automatic run_mode(timebase_e m, int unsigned period, int unsigned n);
    @(negedge clk);
    tick_sel = m;
    expect_period = period;
    resync = 1'b1;
    wait_steps(n + 1);
    $display("mode %0d: %0d steps, %0d cycles apart", m, n + 1, period);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) mode_steps[i] = 0;
    step_btn = 1'b0;
    tick_sel = TB_STEP;
    reset = 1'b1;
    do_reset();

    // 1. one full cycle of the clock, one button press per second
    expect_period = 0;
    for (int p = 0; p < DAY + 3; p++) begin
      step_btn = 1'b1;
      repeat (3) @(negedge clk);
      step_btn = 1'b0;
      repeat (3) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (decode_time() != 3 || steps != DAY + 3) begin
      failures++;
      $display("FAIL after %0d presses: display %0d, %0d steps", DAY + 3, decode_time(), steps);
    end
    $display("step mode: %0d presses, full cycle done", DAY + 3);

    // 2. the divider time bases
    run_mode(TB_10KHZ, P_10KHZ, N_10KHZ);
    run_mode(TB_100HZ, P_100HZ, N_100HZ);
    run_mode(TB_1HZ,   P_1HZ,   N_1HZ);

    // 3. reset while counting at 10 kHz
    run_mode(TB_10KHZ, P_10KHZ, 50);
    repeat (P_10KHZ / 2) @(negedge clk);
    do_reset();
    run_mode(TB_10KHZ, P_10KHZ, 3);

    checks++;
    if (wrap_s0 == 0 || wrap_s1 == 0 || wrap_m0 == 0 || wrap_m1 == 0 || wrap_h0 == 0 ||
        wrap_day == 0 || resets_seen < 2 || mode_steps[TB_STEP] == 0 ||
        mode_steps[TB_1HZ] == 0 || mode_steps[TB_100HZ] == 0 || mode_steps[TB_10KHZ] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("wraps: sec units %0d, sec tens %0d, min units %0d, min tens %0d, hour units %0d, day %0d",
             wrap_s0, wrap_s1, wrap_m0, wrap_m1, wrap_h0, wrap_day);
    $display("steps per mode: 1Hz %0d, 100Hz %0d, 10kHz %0d, button %0d; resets %0d",
             mode_steps[TB_1HZ], mode_steps[TB_100HZ], mode_steps[TB_10KHZ],
             mode_steps[TB_STEP], resets_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
