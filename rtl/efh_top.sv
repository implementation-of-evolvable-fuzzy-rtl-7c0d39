// efh_top: evolvable fuzzy hardware (EFH) two-class cell multiplexer.
//
// Live path: Class1 (delay sensitive) and Class2 (loss sensitive) cells are
// queued in BUF1/BUF2 (cell_buffer); on every slot_tick the multiplexer
// (mp_unit) sends one cell to the OUT channel, choosing the class with the
// working RFIC, a fuzzy controller driven by c1 (Class1 rate) and c2 (free
// share of BUF2) from fuzzy_inputs.
// Adaptation path: training buffers TB1/TB2 record each slot's arrivals.
// Whenever a full window of TB_LEN new slots is recorded and the GA is
// idle, the window is frozen and the evolution_module runs POP x GENS
// evaluations on the sched_model (a second RFIC with a simulated
// multiplexer).  If it finds a rule set that beats the working one on that
// window, it is switched into the working RFIC's context register in one
// clock while cells keep flowing.  After reset the working RFIC holds the
// core rule set.
//
// Interface: one cell may arrive per class and one leaves per slot_tick;
// slot_tick must be at least 4 clocks apart (the RFIC needs 3 clocks to
// follow a change of c1/c2).  lambda (8 fraction bits) sets the desired
// Class1 delay as a fraction of TB_LEN slots.  loss1/loss2 pulse when an
// arriving cell finds its buffer full.  ctx_switch pulses when a new rule
// set goes live; evo_kept when a GA run kept the working set.
module efh_top
  import efh_pkg::*;
#(
  parameter int unsigned BUF_LEN = 100,
  parameter int unsigned TB_LEN  = 300,
  parameter int unsigned CELL_W  = 16,
  parameter int unsigned WIN     = 32,
  parameter int unsigned POP     = 12,
  parameter int unsigned GENS    = 14,
  parameter int unsigned LF      = 8,
  parameter int unsigned FIT_W   = 20
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         slot_tick,
  input  logic                         in1_valid,
  input  logic [CELL_W-1:0]            in1_cell,
  input  logic                         in2_valid,
  input  logic [CELL_W-1:0]            in2_cell,
  input  logic [LF-1:0]                lambda,
  output logic                         out_valid,
  output logic                         out_class,   // 0 = Class1, 1 = Class2
  output logic [CELL_W-1:0]            out_cell,
  output logic                         loss1,
  output logic                         loss2,
  output logic [$clog2(BUF_LEN+1)-1:0] buf1_count,
  output logic [$clog2(BUF_LEN+1)-1:0] buf2_count,
  output fin_t                         c1,
  output fin_t                         c2,
  output logic                         sel_t,
  output chrom_t                       work_ctx,
  output logic                         evo_busy,
  output logic                         ctx_switch,
  output logic                         evo_kept,
  output logic [FIT_W-1:0]             best_fitness,
  output logic [FIT_W-1:0]             work_fitness
);
  localparam int unsigned IW = $clog2(TB_LEN);

  // live multiplexer
  logic              pop1, pop2, b1_empty, b2_empty, b1_full, b2_full;
  logic [CELL_W-1:0] b1_head, b2_head;

  cell_buffer #(.DEPTH(BUF_LEN), .CELL_W(CELL_W)) u_buf1 (
    .clk, .rst_n, .clear(1'b0), .push(slot_tick && in1_valid), .wr_data(in1_cell),
    .pop(pop1), .rd_data(b1_head), .count(buf1_count), .empty(b1_empty), .full(b1_full),
    .drop(loss1)
  );

  cell_buffer #(.DEPTH(BUF_LEN), .CELL_W(CELL_W)) u_buf2 (
    .clk, .rst_n, .clear(1'b0), .push(slot_tick && in2_valid), .wr_data(in2_cell),
    .pop(pop2), .rd_data(b2_head), .count(buf2_count), .empty(b2_empty), .full(b2_full),
    .drop(loss2)
  );

  fuzzy_inputs #(.BUF_LEN(BUF_LEN), .WIN(WIN)) u_fin (
    .clk, .rst_n, .clear(1'b0), .slot_tick, .arr1(in1_valid), .buf2_count, .c1, .c2
  );

  // working RFIC: evaluates every clock, context switched by the GA
  chrom_t            new_chrom;
  logic              w_valid;
  logic [P_BITS+5:0] w_agg_t, w_agg_f;

  rfic u_rfic_work (
    .clk, .rst_n, .in_valid(1'b1), .c1, .c2,
    .ctx_load(ctx_switch), .ctx_in(new_chrom), .ctx(work_ctx),
    .out_valid(w_valid), .sel_t, .agg_t(w_agg_t), .agg_f(w_agg_f)
  );

  mp_unit #(.CELL_W(CELL_W)) u_mp (
    .clk, .rst_n, .slot_tick, .sel_t,
    .buf1_empty(b1_empty), .buf1_head(b1_head),
    .buf2_empty(b2_empty), .buf2_head(b2_head),
    .pop1, .pop2, .out_valid, .out_class, .out_cell
  );

  // training buffers
  logic                      evo_start;
  logic [IW-1:0]             replay_idx;
  logic                      tb1_bit, tb2_bit;
  logic [$clog2(TB_LEN+1)-1:0] tb1_filled, tb2_filled;

  training_buffer #(.LEN(TB_LEN)) u_tb1 (
    .clk, .rst_n, .slot_tick, .arrival(in1_valid), .snap(evo_start),
    .replay_idx, .replay_bit(tb1_bit), .filled(tb1_filled)
  );

  training_buffer #(.LEN(TB_LEN)) u_tb2 (
    .clk, .rst_n, .slot_tick, .arrival(in2_valid), .snap(evo_start),
    .replay_idx, .replay_bit(tb2_bit), .filled(tb2_filled)
  );

  // evolution: scheduling model + GA
  logic             ev_start, ev_done, sm_busy, evo_done;
  chrom_t           ev_chrom;
  logic [FIT_W-1:0] ev_fit;
  logic [$clog2(TB_LEN*TB_LEN+1)-1:0] sm_delay_sum;
  logic [$clog2(TB_LEN+1)-1:0]        sm_tau;

  assign evo_start = !evo_busy && (tb1_filled == ($bits(tb1_filled))'(TB_LEN));

  sched_model #(.TB_LEN(TB_LEN), .BUF_LEN(BUF_LEN), .WIN(WIN), .LF(LF), .FIT_W(FIT_W)) u_sm (
    .clk, .rst_n, .eval_start(ev_start), .eval_chrom(ev_chrom), .lambda,
    .replay_idx, .tb1_bit, .tb2_bit, .busy(sm_busy),
    .eval_done(ev_done), .eval_fitness(ev_fit), .delay_sum(sm_delay_sum), .tau(sm_tau)
  );

  evolution_module #(.POP(POP), .GENS(GENS), .FIT_W(FIT_W)) u_evo (
    .clk, .rst_n, .start(evo_start), .work_chrom(work_ctx),
    .eval_start(ev_start), .eval_chrom(ev_chrom), .eval_done(ev_done), .eval_fitness(ev_fit),
    .busy(evo_busy), .done(evo_done), .switch_ctx(ctx_switch), .kept(evo_kept), .new_chrom,
    .best_fitness, .work_fitness
  );
endmodule
