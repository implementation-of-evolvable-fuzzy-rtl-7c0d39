// tb_training_buffer: arrival flags recorded per slot (LEN = 20) must be
// replayed oldest first from the frozen copy taken at snap, unaffected by
// later recording; filled counts slots since the snap, saturating at LEN.
module tb_training_buffer;
  int checks = 0, failures = 0;
  localparam int L = 20;
  logic clk = 0, rst_n = 0, slot_tick = 0, arrival = 0, snap = 0;
  logic [4:0] replay_idx = '0;
  logic replay_bit;
  logic [4:0] filled;
  bit live[$], frozen[$];
  int since;
  training_buffer #(.LEN(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < L; i++) begin live.push_back(0); frozen.push_back(0); end
    since = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      slot_tick = 1'($urandom_range(1));
      arrival = 1'($urandom_range(1));
      snap = ($urandom_range(40) == 0);
      replay_idx = 5'($urandom_range(L - 1));
      #1;
      checks++;
      if (replay_bit !== frozen[replay_idx]) begin
        failures++; $display("FAIL replay idx=%0d", replay_idx);
      end
      checks++;
      if (int'(filled) != since) begin failures++; $display("FAIL filled %0d exp %0d", filled, since); end
      @(posedge clk);
      if (slot_tick) begin live.push_back(arrival); void'(live.pop_front()); end
      if (snap) begin frozen = live; since = 0; end
      else if (slot_tick && since != L) since++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
