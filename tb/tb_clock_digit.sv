// Testbench of clock_digit: three digits with the moduli the clock uses (10, 6 and 2),
// driven by the same random count and occasional clear. Each cycle the value, the
// segment pattern and the same-cycle carry are compared with a reference count modulo
// LIMIT; every digit must wrap at least once.
module tb_clock_digit;
  import clock_pkg::*;
  import seg_ref_pkg::*;

  localparam int unsigned N = 3;
  localparam int unsigned LIM [N] = '{10, 6, 2};

  logic clk = 1'b0, clear, count_in;
  logic  [N-1:0] carry;
  bcd_t  q   [N];
  seg7_t seg [N];
  int checks = 0, failures = 0;
  int unsigned model [N];
  int wraps [N];

  for (genvar k = 0; k < N; k++) begin : g_dut
    clock_digit #(.LIMIT(LIM[k])) dut (
      .clk(clk), .clear(clear), .count_in(count_in),
      .carry_out(carry[k]), .q(q[k]), .seg(seg[k])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1;
    count_in = 1'b0;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      model[k] = 0;
      wraps[k] = 0;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clear    = ($urandom_range(0, 99) == 0);
      count_in = ($urandom_range(0, 2) != 0);
      #1;
      for (int k = 0; k < N; k++) begin
        logic exp_carry;
        exp_carry = count_in && (model[k] == LIM[k] - 1);
        checks++;
        if (q[k] !== bcd_t'(model[k]) || seg[k] !== seg_of(model[k]) || carry[k] !== exp_carry) begin
          failures++;
          $display("FAIL n=%0d LIMIT %0d: q=%0d/%0d seg=%b carry=%b/%b", n, LIM[k],
                   q[k], model[k], seg[k], carry[k], exp_carry);
        end
      end
      @(posedge clk);
      for (int k = 0; k < N; k++) begin
        if (clear) model[k] = 0;
        else if (count_in) begin
          if (model[k] == LIM[k] - 1) wraps[k]++;
          model[k] = (model[k] + 1) % LIM[k];
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (wraps[k] == 0) begin
        failures++;
        $display("FAIL digit with LIMIT %0d never wrapped", LIM[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
