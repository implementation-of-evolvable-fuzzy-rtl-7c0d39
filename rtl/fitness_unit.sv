// fitness_unit: fitness of one evaluated rule set (Eq. 1-3 of the scheme).
//
//   AveDelay    = (sum of Class1 waiting times) / tau       (Eq. 2)
//   DelayFactor = rho * v = 1 slot * TB_LEN                  (Eq. 3)
//   F           = KAPPA - |AveDelay - lambda * DelayFactor|  (Eq. 1)
//
// Times are counted in cell slots, so rho (the time to send one cell) is one
// slot.  lambda is an unsigned fraction with LF fraction bits (0.35 is
// about 90/256); AveDelay is formed with LF fraction bits by a sequential
// divider, and F carries the same LF fraction bits.  When no Class1 cell was
// sent (tau = 0) AveDelay is taken as TB_LEN slots, the longest possible
// wait; that rule, the fixed-point format and KAPPA = 2^FIT_W - 1 are this
// design's choices.
//
// Timing: done pulses NW+3 clocks after start (NW = SW + LF), with fitness
// valid until the next start.
module fitness_unit #(
  parameter int unsigned TB_LEN = 300,
  parameter int unsigned SW     = 17,   // width of the delay sum
  parameter int unsigned TW     = 9,    // width of tau
  parameter int unsigned LF     = 8,    // fraction bits of lambda
  parameter int unsigned FIT_W  = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SW-1:0]    delay_sum,
  input  logic [TW-1:0]    tau,
  input  logic [LF-1:0]    lambda,
  output logic             done,
  output logic [FIT_W-1:0] fitness
);
  localparam int unsigned NW = SW + LF;
  localparam logic [FIT_W-1:0] KAPPA = '1;

  logic          div_start, div_done, div_busy;
  logic [NW-1:0] quo;
  logic          no_cells, pend, fin;
  logic [NW-1:0] ave, target, diff;

  assign div_start = start && (tau != 0);

  seq_divider #(.NW(NW), .DW(TW)) u_div (
    .clk, .rst_n, .start(div_start), .num({delay_sum, LF'(0)}), .den(tau),
    .busy(div_busy), .done(div_done), .quo
  );

  assign target = NW'(lambda) * NW'(TB_LEN);
  assign ave    = no_cells ? (NW'(TB_LEN) << LF) : quo;
  assign diff   = (ave > target) ? ave - target : target - ave;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      no_cells <= 1'b0;
      pend     <= 1'b0;
      fin      <= 1'b0;
      done     <= 1'b0;
      fitness  <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start) begin
        no_cells <= (tau == 0);
        pend     <= 1'b1;
      end
      if (pend && (div_done || (no_cells && !div_busy))) begin
        pend <= 1'b0;
        fin  <= 1'b1;
      end
      if (fin) begin
        fitness <= (diff > NW'(KAPPA)) ? '0 : KAPPA - FIT_W'(diff);
        done    <= 1'b1;
      end
    end
  end
endmodule
