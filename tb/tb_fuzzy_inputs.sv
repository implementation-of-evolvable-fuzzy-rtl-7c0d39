// tb_fuzzy_inputs: random Class1 arrivals and BUF2 levels; c1 must be the
// arrival count of the last WIN slots scaled by 32/WIN and saturated at 31,
// c2 must be floor(free * 31 / BUF_LEN); clear empties the window.
module tb_fuzzy_inputs;
  int checks = 0, failures = 0;
  localparam int L = 100, W = 32;
  logic clk = 0, rst_n = 0, clear = 0, slot_tick = 0, arr1 = 0;
  logic [6:0] buf2_count = '0;
  logic [4:0] c1, c2;
  bit hist[$];
  int sat31 = 0;
  fuzzy_inputs #(.BUF_LEN(L), .WIN(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int cnt, e1;
      @(negedge clk);
      slot_tick = 1'($urandom_range(3) != 0);
      arr1 = (n < 1000) ? 1'($urandom_range(1)) : (n < 2000) ? 1'b1 : 1'($urandom_range(5) == 0);
      clear = (n == 2500);
      buf2_count = 7'($urandom_range(L));
      #1;
      checks++;
      if (int'(c2) != ((L - int'(buf2_count)) * 31) / L) begin
        failures++; $display("FAIL c2=%0d count=%0d", c2, buf2_count);
      end
      @(posedge clk);
      if (clear) hist.delete();
      else if (slot_tick) begin
        hist.push_back(arr1);
        if (hist.size() > W) void'(hist.pop_front());
      end
      #1;
      cnt = 0;
      foreach (hist[i]) cnt += int'(hist[i]);
      e1 = cnt * 32 / W;
      if (e1 > 31) e1 = 31;
      if (e1 == 31) sat31++;
      checks++;
      if (int'(c1) != e1 && (slot_tick || clear)) begin
        failures++; $display("FAIL c1=%0d exp=%0d n=%0d", c1, e1, n);
      end
    end
    checks++;
    if (sat31 == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
