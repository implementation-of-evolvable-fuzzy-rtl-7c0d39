// tb_sched_model: the scheduling model at a reduced window (TB_LEN = 40,
// BUF_LEN = 8, WIN = 8) evaluates several rule sets (core, all-T, all-F and
// random) on random traffic that overloads the simulated buffers.  The
// testbench plays the training buffers and runs its own slot-by-slot model
// of the replay (rate window, buffer levels, fuzzy decision, waiting times);
// delay_sum, tau and the fitness must match it, and eval_done must come
// 4*TB_LEN + NW + 6 clocks after eval_start (NW = SW + LF).
module tb_sched_model;
  import efh_pkg::*;
  import efh_ref_pkg::*;
  localparam int L = 40, B = 8, W = 8;
  localparam int SW = $clog2(L * L + 1), TW = $clog2(L + 1);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, eval_start = 0;
  chrom_t eval_chrom = '0;
  logic [7:0] lambda = 8'd90;
  logic [5:0] replay_idx;
  logic tb1_bit, tb2_bit, busy, eval_done;
  logic [19:0] eval_fitness;
  logic [SW-1:0] delay_sum;
  logic [TW-1:0] tau;
  bit a1[L], a2[L];
  int drops_seen = 0;

  sched_model #(.TB_LEN(L), .BUF_LEN(B), .WIN(W)) dut (.*);
  assign tb1_bit = a1[replay_idx];
  assign tb2_bit = a2[replay_idx];
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic model(input logic [49:0] ch, output int sum, output int ntau, output longint fit);
    int q[$];
    bit h[$];
    int b2, c1, c2, cnt, s2, lam;
    bit sel, s1;
    longint ave, tgt, diff;
    sum = 0; ntau = 0; b2 = 0;
    for (int t = 0; t < L; t++) begin
      cnt = 0;
      foreach (h[i]) cnt += int'(h[i]);
      c1 = cnt * 32 / W; if (c1 > 31) c1 = 31;
      c2 = (B - b2) * 31 / B;
      sel = ref_sel(ch, c1, c2);
      s1 = q.size() != 0 && (sel || b2 == 0);
      s2 = (!s1 && b2 != 0) ? 1 : 0;
      if (s1) begin sum += t - q.pop_front(); ntau++; end
      if (a1[t]) begin
        if (q.size() < B) q.push_back(t); else drops_seen++;
      end
      b2 -= s2;
      if (a2[t] && b2 < B) b2++;
      h.push_back(a1[t]);
      if (h.size() > W) void'(h.pop_front());
    end
    lam  = int'(lambda);
    ave  = (ntau == 0) ? L * 256 : (longint'(sum) * 256) / ntau;
    tgt  = longint'(lam) * L;
    diff = (ave > tgt) ? ave - tgt : tgt - ave;
    fit  = 20'hFFFFF - diff;
  endtask

  initial begin
    logic [49:0] ch;
    repeat (2) @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 24; n++) begin
      int sum, nt, cyc;
      longint fit;
      case (n % 4)
        0: ch = ref_core();
        1: ch = {25{2'd1}};
        2: ch = {25{2'd2}};
        default: begin
          ch = {$urandom, $urandom};
          for (int g = 0; g < 25; g++) if (ch[2*g +: 2] == 2'd3) ch[2*g +: 2] = 2'd0;
        end
      endcase
      for (int t = 0; t < L; t++) begin
        a1[t] = (n < 12) ? 1'b1 : 1'($urandom_range(3) != 0);
        a2[t] = ((t / 10) % 2 == 0) ? 1'b1 : 1'($urandom_range(4) == 0);
      end
      lambda = (n % 2) ? 8'd90 : 8'($urandom);
      model(ch, sum, nt, fit);
      @(negedge clk);
      eval_chrom = ch; eval_start = 1;
      @(negedge clk); eval_start = 0;
      cyc = 1;
      while (!eval_done) begin @(negedge clk); cyc++; end
      checks += 4;
      if (int'(delay_sum) != sum) begin failures++; $display("FAIL n=%0d sum %0d exp %0d", n, delay_sum, sum); end
      if (int'(tau) != nt) begin failures++; $display("FAIL n=%0d tau %0d exp %0d", n, tau, nt); end
      if (longint'(eval_fitness) != fit) begin failures++; $display("FAIL n=%0d fit %0d exp %0d", n, eval_fitness, fit); end
      if (cyc != 4 * L + SW + 8 + 6) begin failures++; $display("FAIL n=%0d cycles %0d", n, cyc); end
    end
    checks++;
    if (drops_seen == 0) begin failures++; $display("FAIL no simulated overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
