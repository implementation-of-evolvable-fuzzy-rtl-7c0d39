// fuzzy_inputs: digitizes the two fuzzy variables of the scheduler.
//
// c1 is the Class1 cell rate relative to the OUT channel capacity.  It is
// measured here over a sliding window of the last WIN slots (a shift
// register of arrival flags and a running count), and scaled to 0..31:
// c1 = min(count * 32 / WIN, 31).  c2 is the fraction of free units in the
// Class2 buffer, c2 = floor((BUF_LEN - buf2_count) * 31 / BUF_LEN).  The
// window length and the scaling are this design's choices; the document
// defines only the two ratios.
//
// Timing: c1 updates on the clock after each slot_tick (it includes that
// slot's arrival flag); c2 follows buf2_count combinationally.  clear
// empties the window.
module fuzzy_inputs
  import efh_pkg::*;
#(
  parameter int unsigned BUF_LEN = 100,
  parameter int unsigned WIN     = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         slot_tick,
  input  logic                         arr1,        // Class1 arrival this slot
  input  logic [$clog2(BUF_LEN+1)-1:0] buf2_count,
  output fin_t                         c1,
  output fin_t                         c2
);
  localparam int unsigned CW = $clog2(WIN + 1);

  logic [WIN-1:0] hist;
  logic [CW-1:0]  cnt;
  logic [CW-1:0]  cnt_next;
  logic [CW+5:0]  c1_scaled;
  logic [$clog2(BUF_LEN+1)+5:0] free_scaled;

  assign cnt_next  = cnt + CW'(arr1) - CW'(hist[WIN-1]);
  assign c1_scaled = ({6'b0, cnt_next} << 5) / (CW+6)'(WIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
      cnt  <= '0;
      c1   <= '0;
    end else if (clear) begin
      hist <= '0;
      cnt  <= '0;
      c1   <= '0;
    end else if (slot_tick) begin
      hist <= {hist[WIN-2:0], arr1};
      cnt  <= cnt_next;
      c1   <= (c1_scaled > 31) ? fin_t'(31) : fin_t'(c1_scaled);
    end
  end

  assign free_scaled = (($bits(free_scaled))'(BUF_LEN - buf2_count) * 31) / ($bits(free_scaled))'(BUF_LEN);
  assign c2          = fin_t'(free_scaled);
endmodule
