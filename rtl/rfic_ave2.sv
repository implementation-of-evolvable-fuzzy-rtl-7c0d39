// rfic_ave2: 2-averaging block of the output aggregation mechanism.
// y = (a + b) / 2, kept exact by giving y one more fraction bit than the
// inputs (y carries W+1 bits, its LSB weighing half an input LSB).
// The exact, widening form is this design's choice.  Combinational.
module rfic_ave2 #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   y
);
  assign y = {1'b0, a} + {1'b0, b};
endmodule
