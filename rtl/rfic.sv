// rfic: reconfigurable fuzzy inference chip (RFIC) for the cell scheduler.
//
// Maps the digitized inputs c1 and c2 to the crisp decision SEL (1 = T,
// send Class1; 0 = F, send Class2) under the rule set held in the context
// register.  Inference is table based: the AEM forms the address {c1, c2},
// each of the 25 partition blocks of the FIM holds the firing strength of
// its antecedent for every input pair, the CMU enables the blocks that carry
// a rule and steers each strength to the T or F side, and the OAM averages
// the two sides and compares them.  A new rule set is switched in by
// pulsing ctx_load; inference never stops for it.  Sizes follow the
// document: k = p = 5, v = w = 5, m = 1.
//
// Timing: fully pipelined, one input per clock; sel_t/agg_t/agg_f/out_valid
// appear 3 clocks after in_valid (AEM register, PB read, output register).
module rfic
  import efh_pkg::*;
#(
  parameter logic [2*NRULES-1:0] RESET_CTX = CORE_RULES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  fin_t            c1,
  input  fin_t            c2,
  input  logic            ctx_load,
  input  chrom_t          ctx_in,
  output chrom_t          ctx,
  output logic            out_valid,
  output logic            sel_t,
  output logic [P_BITS+5:0] agg_t,
  output logic [P_BITS+5:0] agg_f
);
  logic [2*K_BITS-1:0] addr;
  logic                addr_valid;
  logic [NRULES-1:0]   ena, sel;
  logic [2*P_BITS-1:0] pb_q [NRULES];
  logic                pb_valid;
  logic [P_BITS+5:0]   oam_t, oam_f;
  logic                oam_sel;

  rfic_aem u_aem (
    .clk, .rst_n, .in_valid, .c1, .c2, .addr, .addr_valid
  );

  rfic_cmu #(.RESET_CTX(RESET_CTX)) u_cmu (
    .clk, .rst_n, .load(ctx_load), .ctx_in, .ctx, .ena, .sel
  );

  rfic_fim u_fim (
    .clk, .rd_en(addr_valid), .addr, .ena, .sel, .pb_q
  );

  rfic_oam u_oam (
    .pb_q, .agg_t(oam_t), .agg_f(oam_f), .sel_t(oam_sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pb_valid  <= 1'b0;
      out_valid <= 1'b0;
      sel_t     <= 1'b1;
      agg_t     <= '0;
      agg_f     <= '0;
    end else begin
      pb_valid  <= addr_valid;
      out_valid <= pb_valid;
      if (pb_valid) begin
        sel_t <= oam_sel;
        agg_t <= oam_t;
        agg_f <= oam_f;
      end
    end
  end
endmodule
