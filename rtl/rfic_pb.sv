// rfic_pb: one partition block (PB) of the fuzzy inference map.
//
// PB<I,J> serves the rule antecedent "c1 is term I and c2 is term J".  It is
// a read-only memory addressed by {Sel, c1, c2}: for every possible input
// pair it stores the rule's firing strength, the minimum of the two degrees
// of membership, placed in the T field (upper P_BITS) when Sel = 1 and in
// the F field (lower P_BITS) when Sel = 0.  The contents are computed at
// elaboration from the membership functions in efh_pkg.  When the block is
// not enabled by the context (no rule for this antecedent) it outputs 0.
//
// Timing: synchronous read, q is valid one clock after rd_en.
module rfic_pb
  import efh_pkg::*;
#(
  parameter int unsigned I = 0,   // c1 term
  parameter int unsigned J = 0    // c2 term
) (
  input  logic                clk,
  input  logic                rd_en,
  input  logic [2*K_BITS-1:0] addr,   // {c1, c2} from the AEM
  input  logic                ena,
  input  logic                sel,
  output logic [2*P_BITS-1:0] q       // {T strength, F strength}
);
  localparam int unsigned AW = 2 * K_BITS + 1;
  typedef logic [2*P_BITS-1:0] word_t;
  typedef word_t rom_t [2**AW];

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 2**AW; a++) begin
      fin_t  x1, x2;
      deg_t  s;
      x1 = fin_t'(a >> K_BITS);
      x2 = fin_t'(a);
      s  = min_deg(membership(I, x1), membership(J, x2));
      r[a] = ((a >> (2 * K_BITS)) & 1) != 0 ? {s, deg_t'(0)} : {deg_t'(0), s};
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (rd_en) q <= ena ? ROM[{sel, addr}] : '0;
  end
endmodule
