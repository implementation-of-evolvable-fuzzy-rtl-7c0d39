// tb_rfic_fim: random addresses and Ena/Sel patterns; each of the 25
// outputs must hold the strength of its own antecedent pair (gene
// g = c2_term*5 + c1_term), steered by its Sel and gated by its Ena.
module tb_rfic_fim;
  import efh_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rd_en = 0;
  logic [9:0] addr = '0;
  logic [24:0] ena = '0, sel = '0;
  logic [9:0] pb_q [25];
  rfic_fim dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      rd_en = 1; addr = 10'($urandom); ena = 25'($urandom); sel = 25'($urandom);
      @(posedge clk); #1;
      for (int j = 0; j < 5; j++)
        for (int i = 0; i < 5; i++) begin
          int g, m;
          logic [9:0] e;
          g = j * 5 + i;
          m = (ref_mu(i, int'(addr[9:5])) < ref_mu(j, int'(addr[4:0]))) ?
              ref_mu(i, int'(addr[9:5])) : ref_mu(j, int'(addr[4:0]));
          e = !ena[g] ? 10'd0 : sel[g] ? {5'(m), 5'd0} : {5'd0, 5'(m)};
          checks++;
          if (pb_q[g] !== e) begin
            failures++; $display("FAIL g=%0d addr=%h q=%h exp=%h", g, addr, pb_q[g], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
