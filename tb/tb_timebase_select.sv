// Testbench of timebase_select: with random strobes on the three rate inputs, the output
// must follow the selected one in the same cycle; in step mode each press of the button,
// however long it is held, must give exactly one tick, two edges after the button rises.
module tb_timebase_select;
  import clock_pkg::*;

  logic clk = 1'b0, rst;
  timebase_e sel;
  logic t1, t100, t10k, btn, tick;
  int checks = 0, failures = 0;
  int presses = 0, step_ticks = 0;

  timebase_select dut (
    .clk(clk), .rst(rst), .sel(sel), .tick_1hz(t1), .tick_100hz(t100),
    .tick_10khz(t10k), .step_btn(btn), .tick(tick)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; btn = 1'b0; sel = TB_1HZ; t1 = 0; t100 = 0; t10k = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // Rate modes: the output is a plain selection of the chosen strobe.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      sel  = timebase_e'($urandom_range(0, 2));
      t1   = $urandom_range(0, 1) == 1;
      t100 = $urandom_range(0, 1) == 1;
      t10k = $urandom_range(0, 1) == 1;
      btn  = $urandom_range(0, 1) == 1;   // ignored outside step mode
      #1;
      checks++;
      if (tick !== (sel == TB_1HZ ? t1 : sel == TB_100HZ ? t100 : t10k)) begin
        failures++;
        $display("FAIL rate mode %0d: tick %b", sel, tick);
      end
    end
    // Step mode: strobes toggle freely but only button presses count.
    @(negedge clk);
    btn = 1'b0;
    sel = TB_STEP;
    repeat (4) @(negedge clk);
    for (int p = 0; p < 40; p++) begin
      int unsigned hold, gap;
      int seen, when;
      hold = $urandom_range(1, 12);
      gap  = $urandom_range(3, 12);
      seen = 0;
      when = -1;
      btn = 1'b1;
      presses++;
      for (int c = 0; c < hold + gap; c++) begin
        if (c == hold) btn = 1'b0;
        t1 = $urandom_range(0, 1) == 1;
        t10k = $urandom_range(0, 1) == 1;
        @(negedge clk);
        if (tick) begin
          seen++;
          when = c;
        end
      end
      step_ticks += seen;
      checks++;
      if (seen != 1 || when != 1) begin
        failures++;
        $display("FAIL press %0d (held %0d): %0d ticks, last after %0d edges", p, hold, seen, when + 1);
      end
    end
    checks++;
    if (presses == 0 || step_ticks != presses) begin
      failures++;
      $display("FAIL %0d presses gave %0d ticks", presses, step_ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
