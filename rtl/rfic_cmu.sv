// rfic_cmu: context memory unit (CMU) of the reconfigurable fuzzy inference
// chip.
//
// Holds the working fuzzy rule set (the context register) and decodes it
// into one Ena and one Sel line per partition block: Ena[g] is set when
// gene g defines a rule (1 = T or 2 = F) and Sel[g] is 1 for a T rule.
// Loading a new rule set is the online context switch: it takes one clock,
// and the new Ena/Sel lines apply from the next clock on.  The register
// resets to RESET_CTX, by default the core rule set of the scheduler.
module rfic_cmu
  import efh_pkg::*;
#(
  parameter logic [2*NRULES-1:0] RESET_CTX = CORE_RULES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  chrom_t            ctx_in,
  output chrom_t            ctx,
  output logic [NRULES-1:0] ena,
  output logic [NRULES-1:0] sel
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    ctx <= RESET_CTX;
    else if (load) ctx <= ctx_in;
  end

  always_comb begin
    for (int g = 0; g < NRULES; g++) begin
      ena[g] = (ctx[g] == GENE_T) || (ctx[g] == GENE_F);
      sel[g] = (ctx[g] == GENE_T);
    end
  end
endmodule
