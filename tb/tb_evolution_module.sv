// tb_evolution_module: the GA (POP = 6, GENS = 4) driven by a stand-in
// evaluator whose fitness counts the genes matching a hidden target rule
// set.  Checks: POP*GENS evaluations per run; the first two members are the
// working and core rule sets; from the second generation on the first
// member evaluated is the best found so far (elitism); at the end the
// reported best/working fitness match the evaluations, and the run either
// switches in the best rule set (when it beats the working one) or keeps
// the working one.  Runs with target = working rule set must keep it.
module tb_evolution_module;
  import efh_pkg::*;
  import efh_ref_pkg::*;
  localparam int POP = 6, GENS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, eval_done = 0;
  chrom_t work_chrom = '0, eval_chrom, new_chrom;
  logic eval_start, busy, done, switch_ctx, kept;
  logic [19:0] eval_fitness = '0, best_fitness, work_fitness;
  logic [49:0] target;
  int n_switch = 0, n_kept = 0;

  evolution_module #(.POP(POP), .GENS(GENS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int score(input logic [49:0] c);
    int s = 0;
    for (int g = 0; g < 25; g++) if (c[2*g +: 2] == target[2*g +: 2]) s += 1000;
    return s;
  endfunction

  task automatic run(input logic [49:0] work, input logic [49:0] tgt);
    int n, best, wfit;
    logic [49:0] best_c;
    target = tgt;
    @(negedge clk);
    work_chrom = work; start = 1;
    @(negedge clk); start = 0;
    n = 0; best = -1; wfit = 0; best_c = '0;
    while (!done) begin
      @(negedge clk);
      if (eval_start) begin
        int f;
        f = score(eval_chrom);
        if (n == 0) begin
          checks++; wfit = f;
          if (eval_chrom !== work) begin failures++; $display("FAIL member0 not working set"); end
        end
        if (n == 1) begin
          checks++;
          if (eval_chrom !== ref_core()) begin failures++; $display("FAIL member1 not core set"); end
        end
        if (n >= POP && n % POP == 0) begin
          checks++;
          if (eval_chrom !== best_c) begin failures++; $display("FAIL elite missing at eval %0d", n); end
        end
        if (f > best) begin best = f; best_c = eval_chrom; end
        for (int g = 0; g < 25; g++) begin
          checks++;
          if (eval_chrom[2*g +: 2] == 2'd3) begin failures++; $display("FAIL gene code 3"); end
        end
        repeat ($urandom_range(5)) @(negedge clk);
        eval_fitness = 20'(f); eval_done = 1;
        @(negedge clk); eval_done = 0;
        n++;
      end
    end
    checks += 4;
    if (n != POP * GENS) begin failures++; $display("FAIL %0d evaluations", n); end
    if (int'(best_fitness) != best || int'(work_fitness) != wfit) begin
      failures++; $display("FAIL fitness report best %0d/%0d work %0d/%0d", best_fitness, best, work_fitness, wfit);
    end
    if (best > wfit) begin
      if (!switch_ctx || kept || new_chrom !== best_c) begin failures++; $display("FAIL expected switch"); end
      n_switch++;
    end else begin
      if (switch_ctx || !kept) begin failures++; $display("FAIL expected keep"); end
      n_kept++;
    end
    if (busy) begin
      @(negedge clk);
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      logic [49:0] w, t;
      w = ref_core();
      if (r % 2) for (int g = 0; g < 25; g++) w[2*g +: 2] = 2'($urandom_range(2));
      t = '0;
      for (int g = 0; g < 25; g++) t[2*g +: 2] = 2'($urandom_range(2));
      run(w, (r % 4 == 3) ? w : t);
    end
    checks++;
    if (n_switch == 0 || n_kept == 0) begin
      failures++; $display("FAIL coverage switch=%0d kept=%0d", n_switch, n_kept);
    end
    $display("switch=%0d kept=%0d", n_switch, n_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
