// tb_rfic_oam: random partition-block words; agg_t and agg_f must equal
// floor(4*S/3) of the T and F field sums S, and sel_t must be S_T >= S_F.
// Sparse patterns (few active blocks, as in real inference) are mixed in.
module tb_rfic_oam;
  int checks = 0, failures = 0;
  logic [9:0]  pb_q [25];
  logic [10:0] agg_t, agg_f;
  logic        sel_t;
  rfic_oam dut (.*);
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      int st, sf;
      st = 0; sf = 0;
      for (int g = 0; g < 25; g++) begin
        if (n % 2 == 0 && $urandom_range(7) != 0) pb_q[g] = '0;
        else pb_q[g] = 10'($urandom);
        st += int'(pb_q[g][9:5]);
        sf += int'(pb_q[g][4:0]);
      end
      #1;
      checks += 3;
      if (int'(agg_t) != (4 * st) / 3) begin failures++; $display("FAIL agg_t %0d st %0d", agg_t, st); end
      if (int'(agg_f) != (4 * sf) / 3) begin failures++; $display("FAIL agg_f %0d sf %0d", agg_f, sf); end
      if (sel_t !== (st >= sf)) begin failures++; $display("FAIL sel %0d st %0d sf %0d", sel_t, st, sf); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
