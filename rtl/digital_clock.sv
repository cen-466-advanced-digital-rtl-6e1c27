// Digital clock HH:MM:SS on six seven-segment displays.
//
// A clock divider turns the board clock (IN_HZ, 50 MHz) into decade strobes down to 1 Hz.
// A time-base selector picks the strobe that counts as one second: 1 Hz for real time,
// 100 Hz or 10 kHz to step quickly through minutes and hours, or one step per press of
// step_btn. Six clock_digit stages are chained: seconds units (modulus 10), seconds tens
// (6), minutes units (10), minutes tens (6), hours units (10) and hours tens (2). Each
// stage's carry advances the next, so a carry ripples through all of them within the cycle
// of the tick, and all six digits change together on the next clock edge. Each digit has its
// own decoder driving an active-low display (bit 6..0 = g..a).
//
// Interface: reset (synchronous, active high) sets the time to 00:00:00 and restarts the
// divider. tick_sel picks the time base (see clock_pkg::timebase_e). second0/second1,
// minute0/minute1 and hour0/hour1 are the units/tens segment patterns of each field.
//
// The chain of counter, comparator and decoder per digit, its moduli and the output names
// follow the design description. Because the hours tens digit wraps at 2 and the hours
// units at 10 independently, as described, the hours run 00..19 and then return to 00;
// the moduli are parameters. The single clock domain with strobes (instead of rippled
// clocks), the reset input and the time-base selector are this design's choices.
module digital_clock
  import clock_pkg::*;
#(
  parameter int unsigned IN_HZ       = 50_000_000,
  parameter int unsigned SEC0_LIMIT  = 10,
  parameter int unsigned SEC1_LIMIT  = 6,
  parameter int unsigned MIN0_LIMIT  = 10,
  parameter int unsigned MIN1_LIMIT  = 6,
  parameter int unsigned HOUR0_LIMIT = 10,
  parameter int unsigned HOUR1_LIMIT = 2
) (
  input  logic      clk,
  input  logic      reset,
  input  timebase_e tick_sel,
  input  logic      step_btn,
  output seg7_t     second0,
  output seg7_t     second1,
  output seg7_t     minute0,
  output seg7_t     minute1,
  output seg7_t     hour0,
  output seg7_t     hour1
);

  localparam int unsigned DIGITS = 6;
  localparam int unsigned LIMITS [DIGITS] = '{SEC0_LIMIT, SEC1_LIMIT, MIN0_LIMIT,
                                              MIN1_LIMIT, HOUR0_LIMIT, HOUR1_LIMIT};

  logic t_1hz, t_100hz, t_10khz;
  logic second_tick;
  logic  [DIGITS:0] carry;   // carry[0] = one-second tick, carry[k+1] = digit k wraps
  bcd_t  digit [DIGITS];
  seg7_t seg   [DIGITS];

  clk_div #(.IN_HZ(IN_HZ)) u_clk_div (
    .clk          (clk),
    .rst          (reset),
    .clock_1mhz   (),
    .clock_100khz (),
    .clock_10khz  (),
    .clock_1khz   (),
    .clock_100hz  (),
    .clock_10hz   (),
    .clock_1hz    (),
    .tick_1mhz    (),
    .tick_100khz  (),
    .tick_10khz   (t_10khz),
    .tick_1khz    (),
    .tick_100hz   (t_100hz),
    .tick_10hz    (),
    .tick_1hz     (t_1hz)
  );

  timebase_select u_timebase (
    .clk        (clk),
    .rst        (reset),
    .sel        (tick_sel),
    .tick_1hz   (t_1hz),
    .tick_100hz (t_100hz),
    .tick_10khz (t_10khz),
    .step_btn   (step_btn),
    .tick       (second_tick)
  );

  assign carry[0] = second_tick;

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    clock_digit #(.LIMIT(LIMITS[k])) u_digit (
      .clk       (clk),
      .clear     (reset),
      .count_in  (carry[k]),
      .carry_out (carry[k + 1]),
      .q         (digit[k]),
      .seg       (seg[k])
    );
  end

  assign second0 = seg[0];
  assign second1 = seg[1];
  assign minute0 = seg[2];
  assign minute1 = seg[3];
  assign hour0   = seg[4];
  assign hour1   = seg[5];

endmodule
