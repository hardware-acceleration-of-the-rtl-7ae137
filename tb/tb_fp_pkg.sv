// tb_fp_pkg: reference arithmetic for the testbenches. Converts between the
// single-precision bit patterns of the design and SystemVerilog reals
// (double precision), rounding double to single to nearest-even and flushing
// results below the normal range to zero, as the design's operators do. It
// also holds the double-precision reference of the Pair HMM forward
// algorithm used by the PE, ring and top-level testbenches.
package tb_fp_pkg;
  import phmm_pkg::*;

  function automatic real fp_to_real(input logic [31:0] f);
    int e;
    real m;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    m = m * (2.0 ** (e - 127));
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real_to_fp(input real x);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [23:0] m;
    logic        g, st;
    b = $realtobits(x);
    s = b[63];
    e = int'(b[62:52]) - 1023 + 127;
    if (b[62:52] == 11'd0 || e <= 0) return {s, 31'd0};
    m  = {1'b0, b[51:29]};
    g  = b[28];
    st = |b[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin m = 24'd0; e = e + 1; end
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // 1 if the two patterns are the same number to within one unit in the
  // last place.
  function automatic bit fp_close(input logic [31:0] got, input logic [31:0] exp);
    longint dg;
    if (got == exp) return 1;
    if (got[31] != exp[31]) return (got[30:0] == 0 && exp[30:0] == 0);
    dg = longint'(got[30:0]) - longint'(exp[30:0]);
    return (dg >= -1 && dg <= 1);
  endfunction

  function automatic bit rel_close(input real got, input real exp, input real tol);
    real d;
    d = got - exp;
    if (d < 0) d = -d;
    if (exp == 0.0) return (got == 0.0);
    return d <= tol * (exp < 0 ? -exp : exp);
  endfunction

  function automatic real rq(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  // Random read-base descriptor: base quality, gap-open and gap-continuation
  // error probabilities in typical ranges, turned into the priors and
  // transition probabilities the accelerator expects.
  function automatic read_desc_t rand_desc();
    read_desc_t d;
    real qb, qi, qd, qg;
    qb = rq(1e-3, 3e-2); qi = rq(1e-4, 1e-2); qd = rq(1e-4, 1e-2); qg = 0.1;
    d.base           = base_t'($urandom);
    d.prior_match    = real_to_fp(1.0 - qb);
    d.prior_mismatch = real_to_fp(qb);
    d.a_mm           = real_to_fp(1.0 - (qi + qd));
    d.a_dm           = real_to_fp(1.0 - qg);
    d.a_mi           = real_to_fp(qi);
    d.a_ii           = real_to_fp(qg);
    d.a_md           = real_to_fp(qd);
    d.a_dd           = real_to_fp(qg);
    return d;
  endfunction

  // Forward algorithm (Eqs. 3.1 - 3.3) in double precision: rows are read
  // bases, columns haplotype bases, transitions of the destination row.
  function automatic real forward(input int hl, input int rl, input base_t hap[],
                                  input read_desc_t rd[]);
    real pm[], pi[], pd[], cm[], ci[], cd[];
    pm = new[hl+1]; pi = new[hl+1]; pd = new[hl+1];
    cm = new[hl+1]; ci = new[hl+1]; cd = new[hl+1];
    for (int c = 0; c <= hl; c++) begin pm[c] = 0.0; pi[c] = 0.0; pd[c] = 0.0; end
    pm[0] = 1.0;
    for (int r = 1; r <= rl; r++) begin
      real amm, adm, ami, aii, amd, add, pr;
      amm = fp_to_real(rd[r-1].a_mm); adm = fp_to_real(rd[r-1].a_dm);
      ami = fp_to_real(rd[r-1].a_mi); aii = fp_to_real(rd[r-1].a_ii);
      amd = fp_to_real(rd[r-1].a_md); add = fp_to_real(rd[r-1].a_dd);
      cm[0] = 0.0; ci[0] = 0.0; cd[0] = 0.0;
      for (int c = 1; c <= hl; c++) begin
        pr = (hap[c-1] == rd[r-1].base) ? fp_to_real(rd[r-1].prior_match)
                                        : fp_to_real(rd[r-1].prior_mismatch);
        cm[c] = pr * (amm * pm[c-1] + adm * (pi[c-1] + pd[c-1]));
        ci[c] = ami * cm[c-1] + aii * ci[c-1];
        cd[c] = amd * pm[c] + add * pd[c];
      end
      pm = cm; pi = ci; pd = cd;
      cm = new[hl+1]; ci = new[hl+1]; cd = new[hl+1];
    end
    return pm[hl] + pi[hl] + pd[hl];
  endfunction

endpackage
