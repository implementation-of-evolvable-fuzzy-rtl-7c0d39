// tb_rfic_ave2: exhaustive check of the 2-averaging block for W = 5:
// y must equal a + b (the average with one fraction bit).
module tb_rfic_ave2;
  int checks = 0, failures = 0;
  logic [4:0] a, b;
  logic [5:0] y;
  rfic_ave2 #(.W(5)) dut (.a, .b, .y);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a = 5'(i); b = 5'(j); #1;
        checks++;
        if (int'(y) != i + j) begin
          failures++;
          $display("FAIL ave2 %0d %0d -> %0d", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
