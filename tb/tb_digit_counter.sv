// Testbench of digit_counter: random clear and count against a reference count, including
// wrap-around past 15 and clear taking priority over count.
module tb_digit_counter;
  logic clk = 1'b0, clear, count;
  logic [3:0] q;
  int checks = 0, failures = 0;
  int unsigned model;
  int wraps = 0, clear_with_count = 0;

  digit_counter #(.WIDTH(4)) dut (.clk(clk), .clear(clear), .count(count), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1;
    count = 1'b1;
    @(posedge clk);
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (q !== 4'(model)) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d expected %0d", n, q, model);
      end
      clear = ($urandom_range(0, 39) == 0);
      count = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear) begin
        if (count) clear_with_count++;
        model = 0;
      end else if (count) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
    end
    checks++;
    if (wraps == 0 || clear_with_count == 0) begin
      failures++;
      $display("FAIL wrap (%0d) or clear with count (%0d) never exercised", wraps, clear_with_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
