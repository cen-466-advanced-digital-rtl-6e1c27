// Clock divider: derives the decade time bases 1 MHz ... 1 Hz from the board clock.
//
// A prescaler divides the IN_HZ input clock down to 1 MHz; six divide-by-10 stages follow,
// each advancing once per period of the stage before it, giving 100 kHz, 10 kHz, 1 kHz,
// 100 Hz, 10 Hz and 1 Hz. Every rate is delivered twice:
//   clock_*  a square wave of that frequency (high for the first half of its period), for
//            driving a pin or an LED;
//   tick_*   a strobe one clk cycle wide, once per period of that frequency, which the rest
//            of the clock uses as a count enable so that all logic stays on clk.
// The strobes of all rates are aligned: tick_1hz is high only in cycles where every faster
// strobe is high too. The first tick_1mhz comes PRESCALE cycles after reset is released,
// the first tick_1hz IN_HZ cycles after.
//
// The 50 MHz input and the seven output rates follow the design description; the square
// wave outputs keep its clock_* names. The strobe outputs, the synchronous active-high rst
// and the counter structure are this design's choice. IN_HZ must be a multiple of 1 MHz and
// at least 2 MHz.
module clk_div #(
  parameter int unsigned IN_HZ = 50_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic clock_1mhz,
  output logic clock_100khz,
  output logic clock_10khz,
  output logic clock_1khz,
  output logic clock_100hz,
  output logic clock_10hz,
  output logic clock_1hz,
  output logic tick_1mhz,
  output logic tick_100khz,
  output logic tick_10khz,
  output logic tick_1khz,
  output logic tick_100hz,
  output logic tick_10hz,
  output logic tick_1hz
);

  localparam int unsigned PRESCALE = IN_HZ / 1_000_000;
  localparam int unsigned PW       = $clog2(PRESCALE);
  localparam int unsigned STAGES   = 6;

  if (IN_HZ % 1_000_000 != 0 || PRESCALE < 2) begin : g_bad_in_hz
    $error("clk_div: IN_HZ must be a multiple of 1 MHz and at least 2 MHz");
  end

  logic [PW-1:0] pre_cnt;
  logic [3:0]    dec_cnt [STAGES];
  logic [STAGES:0] tick;     // tick[0] = 1 MHz ... tick[6] = 1 Hz
  logic [STAGES:0] square;

  // Prescaler: IN_HZ down to 1 MHz.
  always_ff @(posedge clk) begin
    if (rst || tick[0]) pre_cnt <= '0;
    else                pre_cnt <= pre_cnt + 1'b1;
  end

  always_comb begin
    tick[0]   = (pre_cnt == PW'(PRESCALE - 1));
    square[0] = (pre_cnt <  PW'(PRESCALE / 2));
  end

  // Decade stages: each counts 0..9 on the strobe of the stage before.
  for (genvar k = 0; k < STAGES; k++) begin : g_decade
    always_ff @(posedge clk) begin
      if (rst)               dec_cnt[k] <= '0;
      else if (tick[k + 1])  dec_cnt[k] <= '0;
      else if (tick[k])      dec_cnt[k] <= dec_cnt[k] + 1'b1;
    end

    always_comb begin
      tick[k + 1]   = tick[k] && (dec_cnt[k] == 4'd9);
      square[k + 1] = (dec_cnt[k] < 4'd5);
    end
  end

  assign {clock_1hz, clock_10hz, clock_100hz, clock_1khz,
          clock_10khz, clock_100khz, clock_1mhz} = square;
  assign {tick_1hz, tick_10hz, tick_100hz, tick_1khz,
          tick_10khz, tick_100khz, tick_1mhz}    = tick;

endmodule
