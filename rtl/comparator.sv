// Magnitude comparator of two unsigned WIDTH-bit values.
//
// Exactly one of less, equal and greater is high: less when a < b, equal when a == b and
// greater when a > b. Purely combinational. The clock uses only the equal output, to
// detect that a digit has reached its last value. The three outputs and the 4-bit width
// follow the design description.
module comparator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             less,
  output logic             equal,
  output logic             greater
);

  always_comb begin
    less    = (a <  b);
    equal   = (a == b);
    greater = (a >  b);
  end

endmodule
