// Up counter with synchronous clear and count enable, one per clock digit.
//
// On each rising clk edge: clear high loads 0; otherwise count high adds 1 (wrapping
// modulo 2**WIDTH); otherwise q holds. clear wins over count. q is a register output, so
// it changes one cycle after the edge that samples clear or count.
//
// The ports (clock, clear, count, Q) and the 4-bit width follow the design description.
// That clear is synchronous and that every counter runs on the one system clock with count
// as an enable, rather than on a divided or rippled clock, is this design's choice: it
// keeps the whole clock in one clock domain.
module digit_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clear,
  input  logic             count,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (clear)      q <= '0;
    else if (count) q <= q + 1'b1;
  end

endmodule
