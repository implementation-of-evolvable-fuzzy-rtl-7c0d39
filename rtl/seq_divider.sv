// seq_divider: unsigned restoring divider, one quotient bit per clock.
// quo = num / den.  Pulse start with num/den valid; done pulses NW clocks
// later with quo valid (quo holds until the next start).  den must not be 0.
// A helper of this design, used by fitness_unit for AveDelay = sum / tau.
module seq_divider #(
  parameter int unsigned NW = 25,
  parameter int unsigned DW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo
);
  logic [DW:0]            rem;
  logic [NW-1:0]          n;
  logic [DW-1:0]          d;
  logic [$clog2(NW+1)-1:0] left;
  logic [DW:0]            trial;

  assign trial = {rem[DW-1:0], n[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; n <= '0; d <= '0; left <= '0; quo <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        n    <= num;
        d    <= den;
        quo  <= '0;
        left <= ($bits(left))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        n <= n << 1;
        if (trial >= {1'b0, d}) begin
          rem <= trial - {1'b0, d};
          quo <= {quo[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          quo <= {quo[NW-2:0], 1'b0};
        end
        left <= left - 1'b1;
        if (left == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
