// Testbench of seven_seg_decoder: all 16 inputs against reference patterns built from the
// lit segments of each glyph, plus the pattern for 1 as the board's displays require it.
module tb_seven_seg_decoder;
  import clock_pkg::*;
  import seg_ref_pkg::*;

  bcd_t  value;
  seg7_t seg;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.value(value), .seg(seg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      value = bcd_t'(d);
      #1;
      checks++;
      if (seg !== seg_of(d)) begin
        failures++;
        $display("FAIL value %0d: seg %b expected %b", d, seg, seg_of(d));
      end
    end
    value = 4'd1;
    #1;
    checks++;
    if (seg !== 7'b1111001) begin
      failures++;
      $display("FAIL pattern for 1 is %b", seg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
