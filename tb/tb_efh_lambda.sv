// tb_efh_lambda: the tunability workload.  efh_top at its default sizes is
// run on the evaluated traffic scenario (Class1 at the full line rate,
// Class2 ON/OFF at the full line rate with 733-slot periods) once for each
// lambda of 0.35, 0.4, 0.6 and 0.8, from reset, for RUN slots each (about
// three complete GA runs).  Every cell and decision is checked by
// efh_scoreboard; per run the testbench checks cell conservation and that
// at least two GA runs finished, and it reports the Class1 mean delay and
// the loss ratio of each class for comparison across lambda.
module tb_efh_lambda;
  import efh_pkg::*;
  localparam int RUN = 170000, ONOFF = 733;
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
  int s;
  longint dsum;
  int dcnt;
  int lams[4] = '{90, 102, 154, 205};

  efh_top dut (.*);

  efh_scoreboard #(.CELL_W(16)) sb (
    .clk, .rst_n, .slot_tick, .in1_valid, .in1_cell, .in2_valid, .in2_cell,
    .out_valid, .out_class, .out_cell, .loss1, .loss2,
    .buf1_count(int'(buf1_count)), .buf2_count(int'(buf2_count)), .c1, .c2, .sel_t,
    .work_ctx, .ctx_switch, .evo_kept
  );

  always #5 clk = ~clk;

  // Class1 waiting time: the cell descriptor carries its arrival slot
  always @(negedge clk) if (rst_n && out_valid && out_class == 1'b0) begin
    dsum += longint'(16'(16'(s) - out_cell));
    dcnt++;
  end

  initial begin
    #(longint'(RUN) * 4 * 40 + 1000000);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      int in1, in2, out1, out2, l1, l2, runs;
      rst_n = 0;
      lambda = 8'(lams[r]);
      repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
      in1 = sb.n_in1; in2 = sb.n_in2; out1 = sb.n_out1; out2 = sb.n_out2;
      l1 = sb.n_loss1; l2 = sb.n_loss2; runs = sb.n_switch + sb.n_kept;
      dsum = 0; dcnt = 0;
      for (s = 0; s < RUN; s++) begin
        @(negedge clk);
        slot_tick = 1;
        in1_valid = 1'b1;
        in2_valid = ((s / ONOFF) % 2 == 0);
        in1_cell  = 16'(s);
        in2_cell  = 16'(s);
        @(negedge clk);
        slot_tick = 0; in1_valid = 0; in2_valid = 0;
        repeat (2) @(negedge clk);
      end
      repeat (8) @(negedge clk);
      in1 = sb.n_in1 - in1; in2 = sb.n_in2 - in2; out1 = sb.n_out1 - out1; out2 = sb.n_out2 - out2;
      l1 = sb.n_loss1 - l1; l2 = sb.n_loss2 - l2; runs = sb.n_switch + sb.n_kept - runs;
      checks += 2;
      if (in1 != out1 + l1 + int'(buf1_count) || in2 != out2 + l2 + int'(buf2_count)) begin
        failures++; $display("FAIL conservation at lambda %0d/256", lams[r]);
      end
      if (runs < 2) begin failures++; $display("FAIL only %0d GA runs", runs); end
      $display("lambda %0d/256: GA runs %0d, Class1 mean delay %0d.%02d slots, loss Class1 %0d/%0d, Class2 %0d/%0d",
               lams[r], runs, int'(dsum / (dcnt > 0 ? dcnt : 1)),
               int'((dsum * 100 / (dcnt > 0 ? dcnt : 1)) % 100), l1, in1, l2, in2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + sb.checks, failures + sb.failures);
    $finish;
  end
endmodule
