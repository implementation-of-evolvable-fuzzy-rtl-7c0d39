// cell_buffer: cell buffer BUF# of the multiplexer (one per traffic class).
//
// A first-in first-out store of DEPTH cells (100 in the document), each a
// CELL_W-bit cell descriptor.  The head cell is visible on rd_data while
// the buffer is not empty (show-ahead).  A push and a pop may happen in the
// same clock; a push that finds the buffer full, with no pop in the same
// clock, is refused and reported on drop for cell-loss accounting.  The
// circular array and the drop pulse are this design's choices.
//
// Timing: count, empty and full update on the clock edge after push/pop.
//
// Lint reports rst_n as used both synchronously and asynchronously: the
// synchronous use is only the disable condition of the assertion below;
// every flop resets asynchronously.
module cell_buffer #(
  parameter int unsigned DEPTH  = 100,
  parameter int unsigned CELL_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,     // synchronous flush
  input  logic                       push,
  input  logic [CELL_W-1:0]          wr_data,
  input  logic                       pop,       // ignored when empty
  output logic [CELL_W-1:0]          rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full,
  output logic                       drop
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CELL_W-1:0] mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic              do_pop, do_push;

  assign empty   = (count == 0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign drop    = push && !do_push;
  assign rd_data = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // a refused push only ever happens on a full buffer
  a_drop_only_when_full: assert property (@(posedge clk) disable iff (!rst_n) drop |-> full);
endmodule
