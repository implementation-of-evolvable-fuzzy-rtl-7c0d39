// tb_rfic_aem: the address encoder must register {c1, c2} one clock after
// in_valid, hold it while in_valid is low, and delay the valid flag by one.
module tb_rfic_aem;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [4:0] c1 = '0, c2 = '0;
  logic [9:0] addr;
  logic addr_valid;
  logic [9:0] exp_addr;
  rfic_aem dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    exp_addr = '0;
    for (int i = 0; i < 500; i++) begin
      logic v;
      @(negedge clk);
      v = 1'($urandom_range(1));
      in_valid = v; c1 = 5'($urandom); c2 = 5'($urandom);
      if (v) exp_addr = {c1, c2};
      @(posedge clk); #1;
      checks++;
      if (addr_valid !== v || addr !== exp_addr) begin
        failures++;
        $display("FAIL aem v=%0d addr=%h exp=%h", addr_valid, addr, exp_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
