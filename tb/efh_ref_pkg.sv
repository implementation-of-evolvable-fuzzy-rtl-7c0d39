// efh_ref_pkg: reference models used by the testbenches, written from the
// specification of the scheduler rather than from the RTL.
//
// Triangle membership: five terms centred at 0, 7.75, 15.5, 23.25, 31 on the
// 0..31 input scale, peak 31, half width 7.75 (computed in real arithmetic).
// Rule strength = min of the two degrees; the T and F sums over all enabled
// rules are compared, T winning ties; the RFIC aggregates are floor(4*S/3).
package efh_ref_pkg;

  function automatic int ref_mu(input int t, input int x);
    real d;
    d = real'(x) - real'(t) * 7.75;
    if (d < 0.0) d = -d;
    if (d >= 7.75) return 0;
    return int'(31.0 - d * 4.0);   // exact: d is a multiple of 0.25
  endfunction

  // gene g of a packed 50-bit rule set
  function automatic int ref_gene(input logic [49:0] chrom, input int g);
    return int'(chrom[2*g +: 2]);
  endfunction

  function automatic void ref_infer(input logic [49:0] chrom, input int c1, input int c2,
                                    output int sum_t, output int sum_f);
    sum_t = 0;
    sum_f = 0;
    for (int j = 0; j < 5; j++)
      for (int i = 0; i < 5; i++) begin
        int s, gv;
        s  = (ref_mu(i, c1) < ref_mu(j, c2)) ? ref_mu(i, c1) : ref_mu(j, c2);
        gv = ref_gene(chrom, j * 5 + i);
        if (gv == 1) sum_t += s;
        else if (gv == 2) sum_f += s;
      end
  endfunction

  function automatic bit ref_sel(input logic [49:0] chrom, input int c1, input int c2);
    int st, sf;
    ref_infer(chrom, c1, c2, st, sf);
    return st >= sf;
  endfunction

  // core rule set "12222,11122,11112,11112,11111", first character = gene 0
  function automatic logic [49:0] ref_core();
    string s;
    logic [49:0] c;
    int g;
    s = "1222211122111121111211111";
    c = '0;
    for (g = 0; g < 25; g++) c[2*g +: 2] = 2'(s[g] - "0");
    return c;
  endfunction

endpackage
