// rfic_fim: fuzzy inference map (FIM) of the reconfigurable fuzzy inference
// chip: the 25 partition blocks, one per antecedent pair.
//
// All blocks share the major address from the AEM; each gets its own Ena
// and Sel line from the CMU.  Output pb_q[g] belongs to gene g, where
// g = J*5 + I (J = c2 term, I = c1 term).  Timing: one-clock read.
// The 25-block organisation follows the published RFIC; the gene order
// (rows of the rule table = c2 terms) is this design's reading of it.
module rfic_fim
  import efh_pkg::*;
(
  input  logic                clk,
  input  logic                rd_en,
  input  logic [2*K_BITS-1:0] addr,
  input  logic [NRULES-1:0]   ena,
  input  logic [NRULES-1:0]   sel,
  output logic [2*P_BITS-1:0] pb_q [NRULES]
);
  for (genvar j = 0; j < NTERMS; j++) begin : g_row
    for (genvar i = 0; i < NTERMS; i++) begin : g_col
      rfic_pb #(.I(i), .J(j)) u_pb (
        .clk  (clk),
        .rd_en(rd_en),
        .addr (addr),
        .ena  (ena[j*NTERMS+i]),
        .sel  (sel[j*NTERMS+i]),
        .q    (pb_q[j*NTERMS+i])
      );
    end
  end
endmodule
