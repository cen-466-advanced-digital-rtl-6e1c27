// Testbench of clk_div at a 2 MHz input (all seven rates still exist, 1 Hz every 2e6
// cycles). After reset is released, n counts clock edges. For a rate of period P cycles
// the strobe must be high exactly when n mod P == P-1 and the square wave exactly when
// n mod P < P/2. Every output is compared with that every cycle for just over two 1 Hz
// periods, and the number of strobes of each rate is checked at the end.
module tb_clk_div;
  localparam int unsigned IN_HZ = 2_000_000;
  localparam int unsigned RUN   = 2 * IN_HZ + 100;

  logic clk = 1'b0, rst;
  logic [6:0] clocks, ticks;
  int checks = 0, failures = 0;
  int unsigned period [7];
  int unsigned nticks [7];

  clk_div #(.IN_HZ(IN_HZ)) dut (
    .clk(clk), .rst(rst),
    .clock_1mhz(clocks[0]), .clock_100khz(clocks[1]), .clock_10khz(clocks[2]),
    .clock_1khz(clocks[3]), .clock_100hz(clocks[4]), .clock_10hz(clocks[5]),
    .clock_1hz(clocks[6]),
    .tick_1mhz(ticks[0]), .tick_100khz(ticks[1]), .tick_10khz(ticks[2]),
    .tick_1khz(ticks[3]), .tick_100hz(ticks[4]), .tick_10hz(ticks[5]),
    .tick_1hz(ticks[6])
  );

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p = IN_HZ / 1_000_000;
    for (int r = 0; r < 7; r++) begin
      period[r] = p;
      nticks[r] = 0;
      p = p * 10;
    end
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int unsigned n = 1; n <= RUN; n++) begin
      @(negedge clk);
      for (int r = 0; r < 7; r++) begin
        logic exp_tick, exp_clock;
        exp_tick  = (n % period[r]) == period[r] - 1;
        exp_clock = (n % period[r]) < period[r] / 2;
        if (ticks[r]) nticks[r]++;
        checks++;
        if (ticks[r] !== exp_tick || clocks[r] !== exp_clock) begin
          failures++;
          if (failures < 20)
            $display("FAIL n=%0d rate %0d: tick %b/%b clock %b/%b", n, r,
                     ticks[r], exp_tick, clocks[r], exp_clock);
        end
      end
    end
    for (int r = 0; r < 7; r++) begin
      checks++;
      if (nticks[r] != RUN / period[r] || nticks[r] == 0) begin
        failures++;
        $display("FAIL rate %0d: %0d strobes, expected %0d", r, nticks[r], RUN / period[r]);
      end
    end
    $display("1 Hz strobes seen: %0d", nticks[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
