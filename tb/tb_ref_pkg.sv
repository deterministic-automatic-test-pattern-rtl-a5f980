// tb_ref_pkg: reference models used by the testbenches, written independently
// of the RTL.
//
//  * cell_ref: gate-level evaluation of the A/S cell with an optional single
//    stuck-at fault, nets numbered as in the fault list (0 a, 1 b, 2 cin,
//    3 m, 4 bx, 5 p, 6 sum, 7 g, 8 h, 9 cout; fault f < 10 is s-a-0 on net f,
//    f >= 10 is s-a-1 on net f-10). Returns {cout, sum}.
//  * det_ref: the full detection table, one 20-bit fault vector per pattern.
//  * min_ref: the three-step minimization (greedy s-a-0, greedy s-a-1,
//    prune the union in index order) the generator is specified to perform.
//  * misr5_step / lfsr10_step: one step of the 5-bit signature register
//    (x^5+x^3+1) and of the 10-bit pattern LFSR (x^10+x^7+1).
package tb_ref_pkg;

  typedef logic [19:0] fvec_t;
  typedef fvec_t       det_t [16];

  typedef struct {
    logic [15:0] sel0;
    logic [15:0] sel1;
    logic [15:0] fin;
    int          r0;
    int          r1;
    fvec_t       detectable;
  } min_t;

  function automatic logic [1:0] cell_ref(input logic [3:0] pat, input bit fen,
                                          input int f);
    logic n [10];
    int   site;
    logic v;
    site = f % 10;
    v    = (f >= 10);
    for (int k = 0; k < 10; k++) begin
      case (k)
        0: n[k] = pat[0];
        1: n[k] = pat[1];
        2: n[k] = pat[2];
        3: n[k] = pat[3];
        4: n[k] = (n[1] != n[3]);
        5: n[k] = (n[0] != n[4]);
        6: n[k] = (n[5] != n[2]);
        7: n[k] = n[0] && n[4];
        8: n[k] = n[5] && n[2];
        default: n[k] = n[7] || n[8];
      endcase
      if (fen && site == k) n[k] = v;
    end
    return {n[9], n[6]};
  endfunction

  function automatic det_t det_ref();
    det_t d;
    for (int p = 0; p < 16; p++) begin
      d[p] = '0;
      for (int f = 0; f < 20; f++)
        d[p][f] = (cell_ref(4'(p), 1'b1, f) != cell_ref(4'(p), 1'b0, 0));
    end
    return d;
  endfunction

  function automatic int popc(input fvec_t v);
    int n = 0;
    for (int i = 0; i < 20; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic int popc16(input logic [15:0] v);
    int n = 0;
    for (int i = 0; i < 16; i++) n += int'(v[i]);
    return n;
  endfunction

  function automatic min_t min_ref(input det_t d);
    min_t  r;
    fvec_t unc;
    fvec_t oth;
    r.detectable = '0;
    for (int p = 0; p < 16; p++) r.detectable |= d[p];
    r.sel0 = '0; r.sel1 = '0; r.r0 = 0; r.r1 = 0;
    for (int ph = 0; ph < 2; ph++) begin
      unc = r.detectable & (ph == 0 ? fvec_t'(20'h003FF) : fvec_t'(20'hFFC00));
      forever begin
        int best = -1, bc = 0;
        for (int p = 0; p < 16; p++)
          if (popc(d[p] & unc) > bc) begin bc = popc(d[p] & unc); best = p; end
        if (best < 0) break;
        if (ph == 0) begin r.sel0[best] = 1'b1; r.r0++; end
        else         begin r.sel1[best] = 1'b1; r.r1++; end
        unc &= ~d[best];
      end
    end
    r.fin = r.sel0 | r.sel1;
    for (int p = 0; p < 16; p++) begin
      oth = '0;
      for (int q = 0; q < 16; q++) if (q != p && r.fin[q]) oth |= d[q];
      if (r.fin[p] && ((d[p] & ~oth) == '0)) r.fin[p] = 1'b0;
    end
    return r;
  endfunction

  function automatic logic [4:0] misr5_step(input logic [4:0] s, input logic [4:0] d);
    logic [4:0] n;
    n[0] = s[4] ^ s[2] ^ d[0];
    for (int i = 1; i < 5; i++) n[i] = s[i-1] ^ d[i];
    return n;
  endfunction

  function automatic logic [9:0] lfsr10_step(input logic [9:0] s);
    return {s[8:0], s[9] ^ s[6]};
  endfunction

  // Response {cout, s} of a W=4 adder/subtractor, computed arithmetically.
  function automatic logic [4:0] as4_ref(input logic [3:0] a, input logic [3:0] b,
                                         input logic m, input logic cin);
    logic [3:0] bm;
    bm = m ? ~b : b;
    return 5'(a) + 5'(bm) + 5'(cin);
  endfunction

endpackage
