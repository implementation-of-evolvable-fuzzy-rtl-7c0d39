// tb_efh_full: efh_top at its default sizes (BUF_LEN = 100, TB_LEN = 300,
// POP = 12, GENS = 14) through one complete adaptation: the training
// buffers fill, a full GA run of 12 x 14 evaluations completes and either
// switches in a new rule set or keeps the working one, and traffic keeps
// flowing afterwards.  Traffic is the evaluated scenario in cell slots:
// Class1 at the full line rate, Class2 ON/OFF at the full line rate with
// 733-slot periods (2 ms at 2.73 us per 53-byte cell at 155.52 Mb/s), with
// lambda = 0.35.  One slot every 4 clocks.  efh_scoreboard checks every
// cell and decision; cell conservation is checked at the end.
module tb_efh_full;
  import efh_pkg::*;
  localparam int MAXSLOTS = 100000, ONOFF = 733, AFTER = 1000;
  logic clk = 0, rst_n = 0, slot_tick = 0, in1_valid = 0, in2_valid = 0;
  logic [15:0] in1_cell = '0, in2_cell = '0;
  logic [7:0] lambda = 8'd90;
  logic out_valid, out_class, loss1, loss2, sel_t, evo_busy, ctx_switch, evo_kept;
  logic [15:0] out_cell;
  logic [6:0] buf1_count, buf2_count;
  fin_t c1, c2;
  chrom_t work_ctx;
  logic [19:0] best_fitness, work_fitness;
  int checks = 0, failures = 0;
  int s, runs_done_at;

  efh_top dut (.*);

  efh_scoreboard #(.CELL_W(16)) sb (
    .clk, .rst_n, .slot_tick, .in1_valid, .in1_cell, .in2_valid, .in2_cell,
    .out_valid, .out_class, .out_cell, .loss1, .loss2,
    .buf1_count(int'(buf1_count)), .buf2_count(int'(buf2_count)), .c1, .c2, .sel_t,
    .work_ctx, .ctx_switch, .evo_kept
  );

  always #5 clk = ~clk;

  task automatic finish_tb();
    checks += sb.checks; failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #(longint'(MAXSLOTS) * 40 + 100000);
    failures++; $display("FAIL watchdog: no GA run finished"); finish_tb();
  end

  initial begin
    runs_done_at = -1;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    s = 0;
    while (runs_done_at < 0 || s < runs_done_at + AFTER) begin
      @(negedge clk);
      slot_tick = 1;
      in1_valid = 1'b1;
      in2_valid = ((s / ONOFF) % 2 == 0);
      in1_cell  = 16'(s);
      in2_cell  = 16'(s) ^ 16'h8000;
      @(negedge clk);
      slot_tick = 0; in1_valid = 0; in2_valid = 0;
      repeat (2) @(negedge clk);
      if (runs_done_at < 0 && (sb.n_switch + sb.n_kept) > 0) begin
        runs_done_at = s;
        $display("GA run finished after %0d slots: %s, best fitness %0d, working %0d", s,
                 sb.n_switch ? "switched" : "kept", best_fitness, work_fitness);
        $display("working rule set now %h", work_ctx);
      end
      s++;
    end
    repeat (8) @(negedge clk);
    checks++;
    if (sb.n_in1 != sb.n_out1 + sb.n_loss1 + int'(buf1_count) ||
        sb.n_in2 != sb.n_out2 + sb.n_loss2 + int'(buf2_count)) begin
      failures++; $display("FAIL conservation");
    end
    checks++;
    if (sb.n_loss1 == 0) begin failures++; $display("FAIL overload caused no loss"); end
    $display("slots %0d, class1 in %0d out %0d lost %0d, class2 in %0d out %0d lost %0d",
             s, sb.n_in1, sb.n_out1, sb.n_loss1, sb.n_in2, sb.n_out2, sb.n_loss2);
    finish_tb();
  end
endmodule
