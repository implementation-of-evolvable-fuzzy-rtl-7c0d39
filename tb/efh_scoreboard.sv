// efh_scoreboard: checker shared by the end-to-end testbenches of efh_top.
//
// It watches the cell interface and the controller outputs and checks:
//  * each class leaves in arrival order, with no cell lost unless a loss
//    pulse marked it at arrival, and no cell invented;
//  * when both buffers hold cells, the class sent is the one chosen by
//    sel_t, and sel_t agrees with the reference inference of the rule set
//    then live for the c1/c2 values it was computed from;
//  * a slot is only left idle when both buffers are empty.
// It also counts how often each mechanism happened.  A reset clears the
// modelled buffer contents but not the counters.
module efh_scoreboard
  import efh_ref_pkg::*;
#(
  parameter int unsigned CELL_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_tick,
  input  logic              in1_valid,
  input  logic [CELL_W-1:0] in1_cell,
  input  logic              in2_valid,
  input  logic [CELL_W-1:0] in2_cell,
  input  logic              out_valid,
  input  logic              out_class,
  input  logic [CELL_W-1:0] out_cell,
  input  logic              loss1,
  input  logic              loss2,
  input  int                buf1_count,
  input  int                buf2_count,
  input  logic [4:0]        c1,
  input  logic [4:0]        c2,
  input  logic              sel_t,
  input  logic [49:0]       work_ctx,
  input  logic              ctx_switch,
  input  logic              evo_kept
);
  int checks = 0, failures = 0;
  int n_loss1 = 0, n_loss2 = 0, n_switch = 0, n_kept = 0;
  int n_sel_t = 0, n_sel_f = 0, n_only1 = 0, n_only2 = 0, n_idle = 0;
  int n_in1 = 0, n_in2 = 0, n_out1 = 0, n_out2 = 0;
  int n_rule_checks = 0;

  logic [CELL_W-1:0] q1[$], q2[$];
  logic [4:0]  c1_h[4], c2_h[4];
  logic [49:0] ctx_h[2];
  int pend_class;    // class expected at the next out_valid, -1 none
  logic [CELL_W-1:0] pend_cell;

  always @(negedge clk) if (!rst_n) begin
    // a reset empties the design's buffers: forget the modelled contents
    q1.delete(); q2.delete();
    pend_class = -1;
  end else begin
    // output of the previous slot
    if (out_valid) begin
      checks++;
      if (pend_class < 0 || int'(out_class) != pend_class) begin
        failures++; $display("FAIL out class %0d expected %0d", out_class, pend_class);
      end else begin
        if (out_class == 0) n_out1++; else n_out2++;
        if (out_cell !== pend_cell) begin
          failures++; $display("FAIL class%0d order %h exp %h", pend_class + 1, out_cell, pend_cell);
        end
      end
    end else if (pend_class >= 0) begin
      failures++; $display("FAIL missing output");
    end
    pend_class = -1;
    if (slot_tick) begin
      // the decision for this slot
      checks++;
      if (buf1_count != q1.size() || buf2_count != q2.size()) begin
        failures++; $display("FAIL buffer level %0d/%0d exp %0d/%0d", buf1_count, buf2_count, q1.size(), q2.size());
      end
      if (q1.size() != 0 && q2.size() != 0) begin
        pend_class = sel_t ? 0 : 1;
        if (sel_t) n_sel_t++; else n_sel_f++;
        // sel_t was computed from c1/c2 of three clocks ago, under the
        // rule set live two clocks ago
        checks++; n_rule_checks++;
        if (sel_t !== ref_sel(ctx_h[1], int'(c1_h[2]), int'(c2_h[2]))) begin
          failures++; $display("FAIL fuzzy decision c1=%0d c2=%0d", c1_h[2], c2_h[2]);
        end
      end else if (q1.size() != 0) begin
        pend_class = 0; n_only1++;
      end else if (q2.size() != 0) begin
        pend_class = 1; n_only2++;
      end else n_idle++;
      // arrivals of this slot, after the departure
      if (pend_class == 0) pend_cell = q1.pop_front();
      if (pend_class == 1) pend_cell = q2.pop_front();
      if (in1_valid) begin n_in1++; if (loss1) n_loss1++; else q1.push_back(in1_cell); end
      if (in2_valid) begin n_in2++; if (loss2) n_loss2++; else q2.push_back(in2_cell); end
    end
    if (ctx_switch) n_switch++;
    if (evo_kept) n_kept++;
    for (int i = 3; i > 0; i--) begin c1_h[i] = c1_h[i-1]; c2_h[i] = c2_h[i-1]; end
    c1_h[0] = c1; c2_h[0] = c2;
    for (int i = 1; i > 0; i--) ctx_h[i] = ctx_h[i-1];
    ctx_h[0] = work_ctx;
  end

  initial begin
    pend_class = -1;
    for (int i = 0; i < 4; i++) begin c1_h[i] = '0; c2_h[i] = '0; end
    for (int i = 0; i < 2; i++) ctx_h[i] = '0;
    pend_cell = '0;
  end
endmodule
