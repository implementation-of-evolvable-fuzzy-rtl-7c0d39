// rfic_oam: output aggregation mechanism (OAM) of the reconfigurable fuzzy
// inference chip.
//
// Averages the fuzzy conclusions of all rules, separately for the T and the
// F output, and picks the larger.  Each of the two aggregation parts is a
// tree of rfic_ave2 blocks closed by one rfic_ave3 block: the 25 partition
// block outputs are padded with zeros to 48 = 2^4 * 3 inputs, reduced
// 48 -> 24 -> 12 -> 6 -> 3 by 2-averaging and 3 -> 1 by 3-averaging, so
// both parts compute sum/48.  The padding and the tie rule (T wins when
// the two averages are equal, including when no rule fires) are this
// design's choices.  Combinational.
module rfic_oam
  import efh_pkg::*;
(
  input  logic [2*P_BITS-1:0] pb_q [NRULES],
  output logic [P_BITS+5:0]   agg_t,
  output logic [P_BITS+5:0]   agg_f,
  output logic                sel_t    // 1: allocate the slot to Class1
);
  localparam int unsigned N0 = 48;

  for (genvar part = 0; part < 2; part++) begin : g_part
    logic [P_BITS-1:0] l0 [N0];
    logic [P_BITS  :0] l1 [N0/2];
    logic [P_BITS+1:0] l2 [N0/4];
    logic [P_BITS+2:0] l3 [N0/8];
    logic [P_BITS+3:0] l4 [N0/16];
    logic [P_BITS+5:0] y;

    // part 0 = T field (upper half of each word), part 1 = F field
    for (genvar n = 0; n < N0; n++) begin : g_in
      if (n < NRULES) begin : g_pb
        assign l0[n] = (part == 0) ? pb_q[n][2*P_BITS-1:P_BITS] : pb_q[n][P_BITS-1:0];
      end else begin : g_pad
        assign l0[n] = '0;
      end
    end
    for (genvar n = 0; n < N0/2; n++) begin : g_l1
      rfic_ave2 #(.W(P_BITS)) u_a (.a(l0[2*n]), .b(l0[2*n+1]), .y(l1[n]));
    end
    for (genvar n = 0; n < N0/4; n++) begin : g_l2
      rfic_ave2 #(.W(P_BITS+1)) u_a (.a(l1[2*n]), .b(l1[2*n+1]), .y(l2[n]));
    end
    for (genvar n = 0; n < N0/8; n++) begin : g_l3
      rfic_ave2 #(.W(P_BITS+2)) u_a (.a(l2[2*n]), .b(l2[2*n+1]), .y(l3[n]));
    end
    for (genvar n = 0; n < N0/16; n++) begin : g_l4
      rfic_ave2 #(.W(P_BITS+3)) u_a (.a(l3[2*n]), .b(l3[2*n+1]), .y(l4[n]));
    end
    rfic_ave3 #(.W(P_BITS+4)) u_a3 (.a(l4[0]), .b(l4[1]), .c(l4[2]), .y(y));
  end

  assign agg_t = g_part[0].y;
  assign agg_f = g_part[1].y;
  assign sel_t = (agg_t >= agg_f);
endmodule
