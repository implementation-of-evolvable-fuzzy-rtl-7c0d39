// training_buffer: training buffer TB# that records the recent cell flow of
// one class for the evolution (TB1 for Class1, TB2 for Class2).
//
// It keeps the arrival flag of each of the last LEN slots (300 in the
// document) in a shift register, newest in bit 0.  On snap the whole record
// is copied into a shadow register that the scheduling model replays while
// the live record keeps filling, so the evolution trains on a fixed window.
// Recording one flag per slot (rather than whole cells) and the shadow copy
// are this design's choices.  replay_bit(i) = flag of the i-th oldest slot.
//
// Timing: rec updates on slot_tick; snap_data is loaded on the clock of snap.
module training_buffer #(
  parameter int unsigned LEN = 300
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              arrival,
  input  logic              snap,
  input  logic [$clog2(LEN)-1:0] replay_idx,  // 0 = oldest slot
  output logic              replay_bit,
  output logic [$clog2(LEN+1)-1:0] filled     // slots recorded since the last snap
);
  localparam int unsigned IW = $clog2(LEN);
  localparam int unsigned FW = $clog2(LEN + 1);

  logic [LEN-1:0] rec, shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec    <= '0;
      shadow <= '0;
      filled <= '0;
    end else begin
      if (slot_tick) rec <= {rec[LEN-2:0], arrival};
      if (snap) begin
        shadow <= slot_tick ? {rec[LEN-2:0], arrival} : rec;
        filled <= '0;
      end else if (slot_tick && filled != FW'(LEN)) begin
        filled <= filled + 1'b1;
      end
    end
  end

  assign replay_bit = shadow[IW'(LEN - 1) - replay_idx];
endmodule
