// tb_cell_buffer: random push/pop traffic against a queue model on a small
// buffer (DEPTH = 5): head data, count, empty/full and the drop pulse of a
// push into a full buffer, including push and pop in the same clock.
module tb_cell_buffer;
  int checks = 0, failures = 0;
  localparam int D = 5;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [15:0] wr_data = '0, rd_data;
  logic [2:0]  count;
  logic empty, full, drop;
  int drops = 0, fulls_with_pop = 0;
  logic [15:0] q[$];
  cell_buffer #(.DEPTH(D), .CELL_W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit exp_drop, do_pop;
      @(negedge clk);
      push = 1'($urandom_range(2) != 0) ^ (n >= 2000 && n < 2600);
      pop  = 1'($urandom_range(3) == 0) ^ (n >= 2000 && n < 2600);
      clear = (n == 3000);
      wr_data = 16'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || empty !== (q.size() == 0) || full !== (q.size() == D) ||
          (q.size() != 0 && rd_data !== q[0])) begin
        failures++; $display("FAIL n=%0d count=%0d exp=%0d", n, count, q.size());
      end
      do_pop   = pop && q.size() != 0;
      exp_drop = push && q.size() == D && !do_pop;
      checks++;
      if (drop !== exp_drop) begin failures++; $display("FAIL drop n=%0d", n); end
      if (exp_drop) drops++;
      if (push && q.size() == D && do_pop) fulls_with_pop++;
      @(posedge clk);
      if (clear) q.delete();
      else begin
        if (do_pop) void'(q.pop_front());
        if (push && !exp_drop) q.push_back(wr_data);
      end
    end
    checks++;
    if (drops == 0 || fulls_with_pop == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
