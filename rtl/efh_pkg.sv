// efh_pkg: types and constants shared by the evolvable fuzzy hardware (EFH)
// packet scheduler.
//
// The fuzzy controller has two inputs, c1 (Class1 cell rate over the output
// capacity) and c2 (free fraction of the Class2 buffer), each digitized to
// K_BITS = 5 bits and described by NTERMS = 5 linguistic terms
// (VS, S, M, L, VL).  A rule set ("chromosome") holds one gene per term
// pair: 0 = no rule, 1 = T (send Class1), 2 = F (send Class2).  Gene index
// g = row*5 + col, where the row is the c2 term and the column the c1 term,
// so the chromosome string "12222,11122,11112,11112,11111" maps directly.
// Code 3 is unused and behaves as "no rule".
//
// The membership functions are this design's own: five evenly spaced
// triangles over the 0..31 input range, each with a peak degree of 31, so
// that two neighbouring terms always sum to 31.
package efh_pkg;

  localparam int unsigned K_BITS  = 5;   // digitized input width (k)
  localparam int unsigned P_BITS  = 5;   // membership / strength width (p)
  localparam int unsigned NTERMS  = 5;   // terms per input (v = w = 5)
  localparam int unsigned NRULES  = NTERMS * NTERMS;  // 25 partition blocks

  typedef logic [K_BITS-1:0] fin_t;      // digitized fuzzy input
  typedef logic [P_BITS-1:0] deg_t;      // membership degree / firing strength

  typedef enum logic [1:0] {
    GENE_NONE = 2'd0,
    GENE_T    = 2'd1,   // allocate the OUT slot to Class1
    GENE_F    = 2'd2,   // allocate the OUT slot to Class2
    GENE_RSVD = 2'd3
  } gene_e;

  typedef logic [1:0] gene_t;
  typedef gene_t [NRULES-1:0] chrom_t;   // gene g at chrom[g]

  // Core (startup) rule set of the scheduler, string "12222,11122,11112,11112,11111".
  localparam chrom_t CORE_RULES = {
    2'd1, 2'd1, 2'd1, 2'd1, 2'd1,   // g24..g20 : c2 = VL
    2'd2, 2'd1, 2'd1, 2'd1, 2'd1,   // g19..g15 : c2 = L
    2'd2, 2'd1, 2'd1, 2'd1, 2'd1,   // g14..g10 : c2 = M
    2'd2, 2'd2, 2'd1, 2'd1, 2'd1,   // g9 ..g5  : c2 = S
    2'd2, 2'd2, 2'd2, 2'd2, 2'd1    // g4 ..g0  : c2 = VS
  };

  // Degree of membership of x in term t (0 = VS ... 4 = VL).
  // Peaks at x*4 = t*31, half width 31 on the x*4 scale.
  function automatic deg_t membership(input int unsigned t, input fin_t x);
    int d;
    d = int'(x) * 4 - int'(t) * 31;
    if (d < 0) d = -d;
    return (d >= 31) ? deg_t'(0) : deg_t'(31 - d);
  endfunction

  function automatic deg_t min_deg(input deg_t a, input deg_t b);
    return (a < b) ? a : b;
  endfunction

endpackage
