// mp_unit: multiplexing unit (MP) that allocates each OUT time slot to
// Class1 or Class2.
//
// On every slot tick it sends the head cell of one buffer.  When both
// buffers hold cells the fuzzy decision sel_t chooses (1 = T = Class1,
// 0 = F = Class2); when only one holds cells that one is sent, so no slot
// is wasted (this work-conserving rule is this design's choice); when both
// are empty the slot stays idle.  The pop strobes are combinational so the
// buffers advance on the same edge; the outgoing cell is registered.
//
// Timing: out_valid/out_class/out_cell appear one clock after slot_tick.
//
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the disable condition of the assertion below;
// every flop resets asynchronously.
module mp_unit #(
  parameter int unsigned CELL_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              sel_t,
  input  logic              buf1_empty,
  input  logic [CELL_W-1:0] buf1_head,
  input  logic              buf2_empty,
  input  logic [CELL_W-1:0] buf2_head,
  output logic              pop1,
  output logic              pop2,
  output logic              out_valid,
  output logic              out_class,   // 0 = Class1, 1 = Class2
  output logic [CELL_W-1:0] out_cell
);
  always_comb begin
    pop1 = 1'b0;
    pop2 = 1'b0;
    if (slot_tick) begin
      if (!buf1_empty && (sel_t || buf2_empty)) pop1 = 1'b1;
      else if (!buf2_empty)                    pop2 = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= 1'b0;
      out_cell  <= '0;
    end else begin
      out_valid <= pop1 || pop2;
      if (pop1) begin
        out_class <= 1'b0;
        out_cell  <= buf1_head;
      end else if (pop2) begin
        out_class <= 1'b1;
        out_cell  <= buf2_head;
      end
    end
  end

  a_one_class: assert property (@(posedge clk) disable iff (!rst_n) !(pop1 && pop2));
endmodule
