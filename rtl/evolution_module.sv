// evolution_module: genetic algorithm that evolves fuzzy rule sets on line.
//
// One run, started by start, works on the training window frozen in the
// training buffers:
//   * initial population of POP rule sets: the working rule set, the core
//     rule set, and POP-2 copies of the working set mutated with per-gene
//     probability INIT_MUT/256;
//   * GENS generations, each evaluating every member through the
//     scheduling model (eval_start/eval_done handshake, one at a time);
//   * breeding: the best rule set seen so far is kept (elitism), every
//     other child comes from two binary tournaments, one-point crossover at
//     a random gene boundary and per-gene mutation with probability
//     MUT/256 to a random gene value 0, 1 or 2;
//   * at the end, if the best fitness is strictly above that of the working
//     rule set (the first member evaluated), new_chrom is offered with a
//     switch_ctx pulse; otherwise kept pulses and the working set stays.
// Population 12 and 14 generations are the document's numbers; the GA
// operators, rates and the xorshift random source are this design's own.
//
// Timing: besides the evaluations, breeding takes about 30 clocks per
// child.  done pulses together with switch_ctx or kept.
module evolution_module
  import efh_pkg::*;
#(
  parameter int unsigned POP      = 12,
  parameter int unsigned GENS     = 14,
  parameter int unsigned FIT_W    = 20,
  parameter int unsigned MUT      = 16,   // per-gene mutation, out of 256
  parameter int unsigned INIT_MUT = 64,   // for the initial population
  parameter logic [31:0] SEED     = 32'h2545_F491
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  chrom_t           work_chrom,
  output logic             eval_start,
  output chrom_t           eval_chrom,
  input  logic             eval_done,
  input  logic [FIT_W-1:0] eval_fitness,
  output logic             busy,
  output logic             done,
  output logic             switch_ctx,
  output logic             kept,
  output chrom_t           new_chrom,
  output logic [FIT_W-1:0] best_fitness,
  output logic [FIT_W-1:0] work_fitness
);
  localparam int unsigned PW = $clog2(POP);
  localparam int unsigned GW = $clog2(GENS + 1);
  localparam int unsigned RW = $clog2(NRULES);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_EVAL, S_EWAIT, S_SELA, S_SELB, S_XO, S_MUT, S_STORE, S_DECIDE
  } state_e;
  state_e state;

  chrom_t           pop_q [POP];
  chrom_t           nxt_q [POP];
  logic [FIT_W-1:0] fit_q [POP];
  chrom_t           best_chrom, par_a, par_b, child;
  logic [PW-1:0]    idx;
  logic [GW-1:0]    gen;
  logic [RW-1:0]    g;
  logic             init_phase;
  logic [31:0]      rnd;

  // xorshift32, advanced every clock
  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  logic [PW-1:0] ri_a, ri_b, win;
  logic [RW-1:0] cut;
  gene_t         rgene;
  assign ri_a  = PW'((32'(rnd[15:0]) * POP) >> 16);
  assign ri_b  = PW'((32'(rnd[31:16]) * POP) >> 16);
  assign win   = (fit_q[ri_a] >= fit_q[ri_b]) ? ri_a : ri_b;
  assign cut   = RW'(((32'(rnd[23:8]) * (NRULES - 1)) >> 16) + 1);   // 1..24
  assign rgene = gene_t'((32'(rnd[27:24]) * 3) >> 4);                 // 0, 1 or 2

  assign busy       = (state != S_IDLE);
  assign eval_chrom = pop_q[idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rnd          <= SEED;
      idx          <= '0;
      gen          <= '0;
      g            <= '0;
      init_phase   <= 1'b0;
      eval_start   <= 1'b0;
      done         <= 1'b0;
      switch_ctx   <= 1'b0;
      kept         <= 1'b0;
      new_chrom    <= CORE_RULES;
      best_chrom   <= CORE_RULES;
      best_fitness <= '0;
      work_fitness <= '0;
      par_a        <= '0;
      par_b        <= '0;
      child        <= '0;
      for (int i = 0; i < POP; i++) begin
        pop_q[i] <= CORE_RULES;
        nxt_q[i] <= CORE_RULES;
        fit_q[i] <= '0;
      end
    end else begin
      rnd        <= xs32(rnd);
      eval_start <= 1'b0;
      done       <= 1'b0;
      switch_ctx <= 1'b0;
      kept       <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          pop_q[0]   <= work_chrom;
          pop_q[1]   <= CORE_RULES;
          gen        <= '0;
          init_phase <= 1'b1;
          if (POP > 2) begin
            idx   <= PW'(2);
            child <= work_chrom;
            g     <= '0;
            state <= S_MUT;
          end else begin
            idx   <= '0;
            state <= S_EVAL;
          end
        end
        S_EVAL: begin
          eval_start <= 1'b1;
          state      <= S_EWAIT;
        end
        S_EWAIT: if (eval_done) begin
          fit_q[idx] <= eval_fitness;
          if (gen == 0 && idx == 0) begin
            work_fitness <= eval_fitness;
            best_fitness <= eval_fitness;
            best_chrom   <= pop_q[idx];
          end else if (eval_fitness > best_fitness) begin
            best_fitness <= eval_fitness;
            best_chrom   <= pop_q[idx];
          end
          if (idx == PW'(POP - 1)) begin
            idx <= PW'(1);
            gen <= gen + 1'b1;
            state <= (gen == GW'(GENS - 1)) ? S_DECIDE : S_SELA;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_EVAL;
          end
        end
        S_SELA: begin
          nxt_q[0] <= best_chrom;
          par_a    <= pop_q[win];
          state    <= S_SELB;
        end
        S_SELB: begin
          par_b <= pop_q[win];
          state <= S_XO;
        end
        S_XO: begin
          for (int k = 0; k < NRULES; k++)
            child[k] <= (RW'(k) < cut) ? par_a[k] : par_b[k];
          g     <= '0;
          state <= S_MUT;
        end
        S_MUT: begin
          if (32'(rnd[7:0]) < (init_phase ? INIT_MUT : MUT)) child[g] <= rgene;
          if (g == RW'(NRULES - 1)) state <= S_STORE;
          else                      g <= g + 1'b1;
        end
        S_STORE: begin
          if (init_phase) pop_q[idx] <= child;
          else            nxt_q[idx] <= child;
          if (idx == PW'(POP - 1)) begin
            idx <= '0;
            if (!init_phase) begin
              pop_q[0] <= nxt_q[0];
              for (int i = 1; i < POP - 1; i++) pop_q[i] <= nxt_q[i];
              pop_q[POP-1] <= child;
            end
            init_phase <= 1'b0;
            state      <= S_EVAL;
          end else begin
            idx <= idx + 1'b1;
            if (init_phase) begin
              child <= pop_q[0];
              g     <= '0;
              state <= S_MUT;
            end else begin
              state <= S_SELA;
            end
          end
        end
        S_DECIDE: begin
          done <= 1'b1;
          if (best_fitness > work_fitness) begin
            new_chrom  <= best_chrom;
            switch_ctx <= 1'b1;
          end else begin
            kept <= 1'b1;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
