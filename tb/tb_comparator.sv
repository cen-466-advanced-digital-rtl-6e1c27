// Testbench of comparator: every pair of 4-bit operands, all three outputs checked.
module tb_comparator;
  logic [3:0] a, b;
  logic less, equal, greater;
  int checks = 0, failures = 0;

  comparator #(.WIDTH(4)) dut (.a(a), .b(b), .less(less), .equal(equal), .greater(greater));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if ({less, equal, greater} !== {i < j, i == j, i > j}) begin
          failures++;
          $display("FAIL a=%0d b=%0d: less=%b equal=%b greater=%b", i, j, less, equal, greater);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
