// tb_mp_unit: all combinations of slot tick, decision and buffer states;
// the pop strobes must follow the allocation rule (T -> Class1 if it has a
// cell, else Class2; F -> Class2 if it has a cell, else Class1) and the sent
// cell must appear registered one clock later with its class.
module tb_mp_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, slot_tick = 0, sel_t = 0, buf1_empty = 1, buf2_empty = 1;
  logic [15:0] buf1_head = '0, buf2_head = '0, out_cell;
  logic pop1, pop2, out_valid, out_class;
  mp_unit #(.CELL_W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      bit e1, e2;
      logic [15:0] h1, h2;
      @(negedge clk);
      slot_tick = 1'($urandom_range(1)); sel_t = 1'($urandom_range(1));
      buf1_empty = 1'($urandom_range(1)); buf2_empty = 1'($urandom_range(1));
      buf1_head = 16'($urandom); buf2_head = 16'($urandom);
      #1;
      e1 = slot_tick && !buf1_empty && (sel_t || buf2_empty);
      e2 = slot_tick && !e1 && !buf2_empty;
      h1 = buf1_head; h2 = buf2_head;
      checks++;
      if (pop1 !== e1 || pop2 !== e2) begin
        failures++; $display("FAIL pops t=%0d s=%0d e=%0d%0d", slot_tick, sel_t, buf1_empty, buf2_empty);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== (e1 || e2) || (e1 && (out_class !== 0 || out_cell !== h1)) ||
          (e2 && (out_class !== 1 || out_cell !== h2))) begin
        failures++; $display("FAIL out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
