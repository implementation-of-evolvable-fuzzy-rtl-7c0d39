// rfic_ave3: 3-averaging block of the output aggregation mechanism.
// y = (a + b + c) / 3 with two extra fraction bits, truncated:
// y = floor(4 * (a + b + c) / 3).  The width and rounding are this
// design's choice.  Combinational.
module rfic_ave3 #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W+1:0] y
);
  logic [W+3:0] s4;
  assign s4 = ({4'b0, a} + {4'b0, b} + {4'b0, c}) << 2;
  assign y  = (W+2)'(s4 / 3);
endmodule
