// One digit of the clock: counter, terminal-value comparator and display decoder.
//
// The digit counts 0 .. LIMIT-1. When count_in is high the counter advances; a comparator
// checks the counter against LIMIT-1, and when the digit is at that last value and count_in
// is high the digit returns to 0 instead and raises carry_out, which is the count_in of the
// next more significant digit. carry_out is combinational (same cycle as count_in); q and
// seg change one cycle after the count_in that advances them. clear forces the digit to 0.
//
// The structure (one counter, one comparator and one seven-segment decoder per digit, the
// comparator's equal output clearing the counter and advancing the next digit) and the
// moduli (10, 6, 10, 6, 10, 2) follow the design description. There, the counter is
// cleared asynchronously the moment it reaches LIMIT and that clear pulse clocks the next
// digit. Here the comparator looks for LIMIT-1 and the wrap happens on the clock edge,
// which shows the same digit sequence without a momentary LIMIT value or a rippled clock.
module clock_digit
  import clock_pkg::*;
#(
  parameter int unsigned LIMIT = 10
) (
  input  logic  clk,
  input  logic  clear,
  input  logic  count_in,
  output logic  carry_out,
  output bcd_t  q,
  output seg7_t seg
);

  if (LIMIT < 2 || LIMIT > 16) begin : g_bad_limit
    $error("clock_digit: LIMIT must lie in 2..16");
  end

  localparam bcd_t LAST = bcd_t'(LIMIT - 1);

  logic at_last;

  digit_counter #(.WIDTH(4)) u_counter (
    .clk   (clk),
    .clear (clear || carry_out),
    .count (count_in),
    .q     (q)
  );

  comparator #(.WIDTH(4)) u_compare (
    .a       (q),
    .b       (LAST),
    .less    (),
    .equal   (at_last),
    .greater ()
  );

  seven_seg_decoder u_decode (
    .value (q),
    .seg   (seg)
  );

  assign carry_out = count_in && at_last;

  // Once cleared, the digit never holds a value past its last one.
  a_in_range: assert property (@(posedge clk) disable iff (clear) q <= LAST)
    else $error("clock_digit: digit value %0d beyond %0d", q, LAST);

endmodule
