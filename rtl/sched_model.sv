// sched_model: the Scheduling Model, which scores a candidate rule set
// without touching live traffic.
//
// It holds its own RFIC and a simulator of the multiplexer.  On eval_start
// the candidate is loaded into the RFIC context register and the simulated
// buffers are emptied; the model then replays the TB_LEN slots stored in
// the training buffers (oldest first).  For each slot it presents c1 and c2
// to the RFIC, waits for the decision, sends at most one cell from the
// simulated BUF1/BUF2 (same rule as mp_unit) and then queues that slot's
// arrivals.  The simulated BUF1 holds the arrival slot of every Class1 cell,
// so the waiting time m(i) of each sent Class1 cell is summed and the cells
// counted (tau); BUF2 only needs its fill level.  After the last slot the
// fitness_unit turns the sum into the fitness of Eq. 1.  Starting from
// empty buffers is this design's choice.
//
// Timing: 4 clocks per replayed slot; eval_done pulses about
// 4*TB_LEN + SW + LF + 6 clocks after eval_start.
module sched_model
  import efh_pkg::*;
#(
  parameter int unsigned TB_LEN  = 300,
  parameter int unsigned BUF_LEN = 100,
  parameter int unsigned WIN     = 32,
  parameter int unsigned LF      = 8,
  parameter int unsigned FIT_W   = 20,
  localparam int unsigned IW     = $clog2(TB_LEN),        // slot index width
  localparam int unsigned TW     = $clog2(TB_LEN + 1),    // tau width
  localparam int unsigned SW     = $clog2(TB_LEN * TB_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             eval_start,
  input  chrom_t           eval_chrom,
  input  logic [LF-1:0]    lambda,
  output logic [IW-1:0]    replay_idx,
  input  logic             tb1_bit,
  input  logic             tb2_bit,
  output logic             busy,
  output logic             eval_done,
  output logic [FIT_W-1:0] eval_fitness,
  output logic [SW-1:0]    delay_sum,
  output logic [TW-1:0]    tau
);
  localparam int unsigned BCW = $clog2(BUF_LEN + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_ASK, S_WAIT, S_FIT, S_FWAIT} state_e;
  state_e state;

  // RFIC under evaluation
  fin_t   c1, c2;
  chrom_t ctx_unused;
  logic   r_valid, r_sel;
  logic [P_BITS+5:0] agg_t_unused, agg_f_unused;

  // simulated buffers
  logic           b1_clear, b1_push, b1_pop, b1_empty, b1_full, b1_drop;
  logic [IW-1:0]  b1_head;
  logic [BCW-1:0] b1_count;
  logic [BCW-1:0] b2_count;
  logic           step, send1, send2;

  logic fit_start, fit_done;

  assign step  = (state == S_WAIT) && r_valid;
  assign send1 = step && !b1_empty && (r_sel || b2_count == 0);
  assign send2 = step && !send1 && (b2_count != 0);

  assign b1_clear = (state == S_LOAD);
  assign b1_push  = step && tb1_bit;
  assign b1_pop   = send1;

  rfic u_rfic (
    .clk, .rst_n,
    .in_valid (state == S_ASK),
    .c1, .c2,
    .ctx_load (eval_start && state == S_IDLE),
    .ctx_in   (eval_chrom),
    .ctx      (ctx_unused),
    .out_valid(r_valid),
    .sel_t    (r_sel),
    .agg_t    (agg_t_unused),
    .agg_f    (agg_f_unused)
  );

  cell_buffer #(.DEPTH(BUF_LEN), .CELL_W(IW)) u_sim_buf1 (
    .clk, .rst_n, .clear(b1_clear),
    .push(b1_push), .wr_data(replay_idx), .pop(b1_pop),
    .rd_data(b1_head), .count(b1_count), .empty(b1_empty), .full(b1_full), .drop(b1_drop)
  );

  fuzzy_inputs #(.BUF_LEN(BUF_LEN), .WIN(WIN)) u_fin (
    .clk, .rst_n, .clear(state == S_LOAD), .slot_tick(step), .arr1(tb1_bit),
    .buf2_count(b2_count), .c1, .c2
  );

  fitness_unit #(.TB_LEN(TB_LEN), .SW(SW), .TW(TW), .LF(LF), .FIT_W(FIT_W)) u_fit (
    .clk, .rst_n, .start(fit_start), .delay_sum, .tau, .lambda,
    .done(fit_done), .fitness(eval_fitness)
  );

  assign fit_start = (state == S_FIT);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      replay_idx <= '0;
      b2_count   <= '0;
      delay_sum  <= '0;
      tau        <= '0;
      eval_done  <= 1'b0;
    end else begin
      eval_done <= 1'b0;
      unique case (state)
        S_IDLE: if (eval_start) state <= S_LOAD;
        S_LOAD: begin
          replay_idx <= '0;
          b2_count   <= '0;
          delay_sum  <= '0;
          tau        <= '0;
          state      <= S_ASK;
        end
        S_ASK:  state <= S_WAIT;
        S_WAIT: if (r_valid) begin
          if (send1) begin
            delay_sum <= delay_sum + SW'(replay_idx - b1_head);
            tau       <= tau + 1'b1;
          end
          if (tb2_bit && (b2_count != BCW'(BUF_LEN) || send2))
            b2_count <= b2_count + 1'b1 - BCW'(send2);
          else
            b2_count <= b2_count - BCW'(send2);
          if (replay_idx == IW'(TB_LEN - 1)) begin
            state <= S_FIT;
          end else begin
            replay_idx <= replay_idx + 1'b1;
            state      <= S_ASK;
          end
        end
        S_FIT:   state <= S_FWAIT;
        S_FWAIT: if (fit_done) begin
          eval_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
