// tb_efh_top: end-to-end run of the scheduler at reduced sizes (BUF_LEN = 10,
// TB_LEN = 40, POP = 4, GENS = 2, WIN = 8), one slot every 4 clocks.
// Traffic follows the shape of the evaluated scenario: Class1 constant rate
// at the full line rate, Class2 ON/OFF at the full line rate (60 slots on,
// 60 off), with a stretch of sparse Class1 against a saturating Class2
// burst under a small lambda, then a quiet tail with no arrivals.  efh_scoreboard checks cell
// order, losses, buffer levels and every fuzzy decision; the testbench
// checks cell conservation and that every mechanism happened: losses of
// both classes, T and F decisions, work-conserving sends from either
// buffer, idle slots, rule-set switches and GA runs that kept the set.
module tb_efh_top;
  import efh_pkg::*;
  localparam int L = 40, B = 10;
  localparam int NSLOTS = 4000, QUIET = 3200;
  logic clk = 0, rst_n = 0, slot_tick = 0, in1_valid = 0, in2_valid = 0;
  logic [15:0] in1_cell = '0, in2_cell = '0;
  logic [7:0] lambda = 8'd90;
  logic out_valid, out_class, loss1, loss2, sel_t, evo_busy, ctx_switch, evo_kept;
  logic [15:0] out_cell;
  logic [3:0] buf1_count, buf2_count;
  fin_t c1, c2;
  chrom_t work_ctx;
  logic [19:0] best_fitness, work_fitness;
  int checks = 0, failures = 0;

  efh_top #(.BUF_LEN(B), .TB_LEN(L), .WIN(8), .POP(4), .GENS(2)) dut (.*);

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
    #(NSLOTS * 40 + 100000);
    failures++; $display("watchdog"); finish_tb();
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("%-24s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int s = 0; s < NSLOTS; s++) begin
      @(negedge clk);
      slot_tick = 1;
      if (s >= 2000 && s < 2600) begin
        // sparse Class1 against a saturating Class2 burst
        in1_valid = (s % 32 == 0);
        in2_valid = 1'b1;
      end else begin
        in1_valid = (s < QUIET) && (s % 3 != 2 || s < 1500);
        in2_valid = (s < QUIET) && ((s / 60) % 2 == 0);
      end
      in1_cell  = 16'(s);
      in2_cell  = 16'(s) ^ 16'h8000;
      if (s == 2000) lambda = 8'd13;    // about 0.05: favour Class1
      @(negedge clk);
      slot_tick = 0; in1_valid = 0; in2_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (sb.n_in1 != sb.n_out1 + sb.n_loss1 + int'(buf1_count) ||
        sb.n_in2 != sb.n_out2 + sb.n_loss2 + int'(buf2_count)) begin
      failures++; $display("FAIL conservation");
    end
    need("class1 losses", sb.n_loss1);
    need("class2 losses", sb.n_loss2);
    need("T decisions", sb.n_sel_t);
    need("F decisions", sb.n_sel_f);
    need("only class1 waiting", sb.n_only1);
    need("only class2 waiting", sb.n_only2);
    need("idle slots", sb.n_idle);
    need("rule set switches", sb.n_switch);
    need("GA runs keeping set", sb.n_kept);
    need("fuzzy decisions checked", sb.n_rule_checks);
    finish_tb();
  end
endmodule
