// tb_rfic_pb: every address of two partition blocks (<VS,VS> and <M,L>) is
// read with Sel = 0 and 1 and Ena = 0 and 1; the word must carry
// min(mu_I(c1), mu_J(c2)) in the T field (Sel = 1) or F field (Sel = 0),
// and 0 when the block is disabled.  Read latency is one clock.
module tb_rfic_pb;
  import efh_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rd_en = 0, ena = 0, sel = 0;
  logic [9:0] addr = '0;
  logic [9:0] q0, q1;
  rfic_pb #(.I(0), .J(0)) dut0 (.clk, .rd_en, .addr, .ena, .sel, .q(q0));
  rfic_pb #(.I(2), .J(3)) dut1 (.clk, .rd_en, .addr, .ena, .sel, .q(q1));
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [9:0] expw(int i, int j, int a, bit s, bit e);
    int m;
    m = (ref_mu(i, a >> 5) < ref_mu(j, a & 31)) ? ref_mu(i, a >> 5) : ref_mu(j, a & 31);
    if (!e) return '0;
    return s ? {5'(m), 5'd0} : {5'd0, 5'(m)};
  endfunction
  initial begin
    for (int a = 0; a < 1024; a++)
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        rd_en = 1; addr = 10'(a); sel = k[0]; ena = k[1];
        @(posedge clk); #1;
        checks += 2;
        if (q0 !== expw(0, 0, a, k[0], k[1])) begin
          failures++; $display("FAIL pb00 a=%0d k=%0d q=%h", a, k, q0);
        end
        if (q1 !== expw(2, 3, a, k[0], k[1])) begin
          failures++; $display("FAIL pb23 a=%0d k=%0d q=%h", a, k, q1);
        end
      end
    // rd_en low holds the word
    @(negedge clk); rd_en = 0; addr = 10'd0; ena = 1; sel = 1;
    @(posedge clk); #1;
    checks++;
    if (q1 !== expw(2, 3, 1023, 1, 1)) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
