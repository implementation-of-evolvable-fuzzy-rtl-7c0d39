// tb_rfic_cmu: the context register must reset to the core rule set, load a
// new rule set only on load, and decode Ena (rule present) and Sel (T rule)
// for each of the 25 genes.
module tb_rfic_cmu;
  import efh_pkg::*;
  import efh_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  chrom_t ctx_in = '0, ctx;
  logic [24:0] ena, sel;
  logic [49:0] expc;
  rfic_cmu dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check_decode();
    for (int g = 0; g < 25; g++) begin
      int gv;
      gv = ref_gene(expc, g);
      checks++;
      if (ena[g] !== (gv == 1 || gv == 2) || sel[g] !== (gv == 1)) begin
        failures++;
        $display("FAIL gene %0d val %0d ena %0d sel %0d", g, gv, ena[g], sel[g]);
      end
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1;
    expc = ref_core();
    checks++;
    if (ctx !== expc) begin failures++; $display("FAIL reset ctx %h", ctx); end
    check_decode();
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic l;
      @(negedge clk);
      l = 1'($urandom_range(1));
      load = l;
      ctx_in = {$urandom, $urandom};
      if (l) expc = ctx_in;
      @(posedge clk); #1;
      checks++;
      if (ctx !== expc) begin failures++; $display("FAIL ctx %h exp %h", ctx, expc); end
      check_decode();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
