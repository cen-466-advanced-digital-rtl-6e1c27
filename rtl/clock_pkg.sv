// Shared types and constants of the HH:MM:SS digital clock.
//
// bcd_t   one decimal digit as a 4-bit binary value (the counters are 4 bits wide).
// seg7_t  the seven segment drives of one display digit, bit 6..0 = g f e d c b a,
//         active low: a 0 lights the segment, as the displays of the target board need.
// timebase_e  which time base advances the clock: the 1 Hz second tick for normal use,
//         100 Hz or 10 kHz to run through minutes and hours quickly on the bench, or one
//         step per press of a push button.
package clock_pkg;

  typedef logic [3:0] bcd_t;
  typedef logic [6:0] seg7_t;

  typedef enum logic [1:0] {
    TB_1HZ    = 2'd0,
    TB_100HZ  = 2'd1,
    TB_10KHZ  = 2'd2,
    TB_STEP   = 2'd3
  } timebase_e;

  // Segment pattern with every segment dark.
  localparam seg7_t SEG_BLANK = 7'b111_1111;

endpackage
