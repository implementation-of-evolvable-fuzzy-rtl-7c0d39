// tb_fitness_unit: random delay sums and cell counts, lambda 0.35 and
// others; the fitness must be KAPPA - |floor(256*sum/tau) - lambda*TB_LEN|
// (all in 1/256 slot), with AveDelay = TB_LEN slots when tau = 0, and done
// must come NW + 3 = 28 clocks after start.
module tb_fitness_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [16:0] delay_sum = '0;
  logic [8:0]  tau = '0;
  logic [7:0]  lambda = 8'd90;
  logic        done;
  logic [19:0] fitness;
  fitness_unit #(.TB_LEN(300), .SW(17), .TW(9), .LF(8), .FIT_W(20)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint ave, tgt, diff, exp;
      int cyc;
      @(negedge clk);
      tau = (n % 50 == 0) ? 9'd0 : 9'($urandom_range(300, 1));
      delay_sum = 17'($urandom_range(int'(tau) * 299));
      lambda = (n % 3 == 0) ? 8'd90 : 8'($urandom);
      start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      ave  = (tau == 0) ? 300 * 256 : (longint'(delay_sum) * 256) / tau;
      tgt  = longint'(lambda) * 300;
      diff = (ave > tgt) ? ave - tgt : tgt - ave;
      exp  = 20'hFFFFF - diff;
      checks++;
      if (longint'(fitness) != exp) begin
        failures++; $display("FAIL sum=%0d tau=%0d lam=%0d fit=%0d exp=%0d", delay_sum, tau, lambda, fitness, exp);
      end
      checks++;
      if (tau != 0 && cyc != 28) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
