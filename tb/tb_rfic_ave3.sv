// tb_rfic_ave3: random check of the 3-averaging block for W = 9:
// y must equal floor(4 * (a + b + c) / 3), including the extremes.
module tb_rfic_ave3;
  int checks = 0, failures = 0;
  logic [8:0]  a, b, c;
  logic [10:0] y;
  rfic_ave3 #(.W(9)) dut (.a, .b, .c, .y);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic try(input int x, input int z, input int w);
    int exp;
    a = 9'(x); b = 9'(z); c = 9'(w); #1;
    exp = (4 * (x + z + w)) / 3;
    checks++;
    if (int'(y) != exp) begin
      failures++;
      $display("FAIL ave3 %0d %0d %0d -> %0d exp %0d", x, z, w, y, exp);
    end
  endtask
  initial begin
    try(0, 0, 0); try(511, 511, 511); try(1, 0, 0); try(2, 0, 0); try(0, 0, 3);
    for (int i = 0; i < 2000; i++) try($urandom_range(511), $urandom_range(511), $urandom_range(511));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
