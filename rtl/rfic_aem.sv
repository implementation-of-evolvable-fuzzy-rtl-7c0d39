// rfic_aem: address encoding mechanism (AEM) of the reconfigurable fuzzy
// inference chip.
//
// It combines the two digitized fuzzy inputs into the major address shared
// by every partition block of the fuzzy inference map: addr = {c1, c2}.
// This design registers the address (and a valid flag) so that the memory
// read in the partition blocks starts from a stable address; the document
// only says that the address is derived by combining the two inputs.
//
// Timing: addr/addr_valid follow c1/c2/in_valid by one clock.
module rfic_aem
  import efh_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  fin_t               c1,
  input  fin_t               c2,
  output logic [2*K_BITS-1:0] addr,
  output logic               addr_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr       <= '0;
      addr_valid <= 1'b0;
    end else begin
      addr_valid <= in_valid;
      if (in_valid) addr <= {c1, c2};
    end
  end
endmodule
