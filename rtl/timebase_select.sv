// Time-base selector: picks the strobe that advances the clock by one second.
//
// sel chooses among the 1 Hz strobe (normal time keeping), the 100 Hz and 10 kHz strobes
// (to run through minutes and hours quickly when testing the display) and a push button,
// where each press advances the clock by exactly one step. The button input passes through
// a two-flip-flop synchroniser and a rising-edge detector, so one press gives one tick, two
// to three cycles after the button goes high. The strobe inputs are passed on in the same
// cycle. tick is high for one clk cycle per step.
//
// Using the faster divider outputs and a push button as the clock source follows the
// testing practice in the design description; selecting among them with one input, the
// active-high button and the absence of a debouncer (a bouncing button may give several
// steps) are this design's choice.
module timebase_select
  import clock_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  timebase_e sel,
  input  logic      tick_1hz,
  input  logic      tick_100hz,
  input  logic      tick_10khz,
  input  logic      step_btn,
  output logic      tick
);

  logic btn_meta, btn_sync, btn_prev;
  logic btn_rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_meta <= 1'b0;
      btn_sync <= 1'b0;
      btn_prev <= 1'b0;
    end else begin
      btn_meta <= step_btn;
      btn_sync <= btn_meta;
      btn_prev <= btn_sync;
    end
  end

  assign btn_rise = btn_sync && !btn_prev;

  always_comb begin
    unique case (sel)
      TB_1HZ:   tick = tick_1hz;
      TB_100HZ: tick = tick_100hz;
      TB_10KHZ: tick = tick_10khz;
      TB_STEP:  tick = btn_rise;
      default:  tick = 1'b0;
    endcase
  end

endmodule
