// tb_rfic: the whole inference chip.  After reset the core rule set must be
// active (spot checks of its table corners), then random inputs are
// streamed one per clock under random context switches; sel_t, agg_t and
// agg_f must match the reference inference for the inputs presented three
// clocks earlier under the context live at that time.
module tb_rfic;
  import efh_pkg::*;
  import efh_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, ctx_load = 0;
  fin_t c1 = '0, c2 = '0;
  chrom_t ctx_in = '0, ctx;
  logic out_valid, sel_t;
  logic [10:0] agg_t, agg_f;
  rfic dut (.*);
  always #5 clk = ~clk;

  // expected results queued at input time
  int q_st[$], q_sf[$];
  logic [49:0] live_ctx;

  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      int st, sf;
      checks++;
      if (q_st.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid");
      end else begin
        st = q_st.pop_front(); sf = q_sf.pop_front();
        if (sel_t !== (st >= sf) || int'(agg_t) != (4 * st) / 3 || int'(agg_f) != (4 * sf) / 3) begin
          failures++;
          $display("FAIL sel=%0d agg_t=%0d agg_f=%0d exp st=%0d sf=%0d", sel_t, agg_t, agg_f, st, sf);
        end
      end
    end
  end

  task automatic apply(input int a, input int b, input bit v);
    int st, sf;
    @(negedge clk);
    in_valid = v; c1 = fin_t'(a); c2 = fin_t'(b);
    if (v) begin
      ref_infer(live_ctx, a, b, st, sf);
      q_st.push_back(st); q_sf.push_back(sf);
    end
  endtask

  initial begin
    live_ctx = ref_core();
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    // core rule set corners: (c1 VS, c2 VS) -> T ; (c1 VL, c2 VS) -> F ; (VL, VL) -> T
    apply(0, 0, 1); apply(31, 0, 1); apply(31, 31, 1); apply(8, 0, 1);
    apply(0, 0, 0);
    repeat (4) @(posedge clk);
    checks++;
    if (q_st.size() != 0) begin failures++; $display("FAIL latency, %0d pending", q_st.size()); end
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(50) == 0) begin
        @(negedge clk);
        in_valid = 0;
        ctx_load = 1;
        ctx_in = {$urandom, $urandom};
        for (int g = 0; g < 25; g++) if (ctx_in[g] == 2'd3 && $urandom_range(1)) ctx_in[g] = 2'd0;
        live_ctx = ctx_in;
        @(negedge clk);
        ctx_load = 0;
      end
      apply($urandom_range(31), $urandom_range(31), 1'($urandom_range(3) != 0));
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q_st.size() != 0) begin failures++; $display("FAIL %0d results missing", q_st.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: the first result must arrive exactly 3 clocks after the first input
  initial begin
    int cyc;
    @(posedge rst_n);
    wait (in_valid);
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!out_valid);
    checks++;
    if (cyc != 3) begin failures++; $display("FAIL latency cyc=%0d", cyc); end
  end
endmodule
