// tb_ref_pkg: integer reference model of the least-squares core, used by the
// testbenches to work out expected results independently of the RTL.
//
// All fixed-point values are held in 64-bit signed integers. Products are
// formed with the * operator (or with the arithmetic definition of each
// approximation), fractional bits are dropped by rounding to nearest (ties
// upwards: add half, then floor-divide by a power of two) and word lengths are applied by sign-extension of the low bits, which is
// the number format of the RTL. Division uses the integer / operator (rounding
// towards zero) with saturation.
package tb_ref_pkg;
  import ls_pkg::*;

  function automatic longint wrap(longint x, int w);
    return (x <<< (64 - w)) >>> (64 - w);
  endfunction

  // round(x / 2^s) for s > 0, x * 2^-s for s <= 0, then cut to w bits
  function automatic longint rq(longint x, int fi, int wo, int fo);
    longint y;
    if (fo >= fi) y = x * (longint'(1) << (fo - fi));
    else          y = (x + (longint'(1) << (fi - fo - 1))) >>> (fi - fo);
    return wrap(y, wo);
  endfunction

  function automatic longint pow2(int s);
    return longint'(1) << s;
  endfunction

  // floor division by 2^s expressed with integer arithmetic
  function automatic longint floordiv2(longint x, int s);
    longint q;
    q = x / pow2(s);
    if ((x % pow2(s)) != 0 && x < 0) q = q - 1;
    return q;
  endfunction

  // Multiplier of width wa x wb with an approximation method.
  function automatic longint mult(longint a, longint b, int wa, int wb, approx_method_t m,
                                  int ta, int tb, int ppt, int k);
    longint s, ma, mb, pa, pb;
    int la, lb, sa, sb;
    case (m)
      AM_EXACT: return a * b;
      AM_INPUT_TRUNC: return floordiv2(a, ta) * pow2(ta) * (floordiv2(b, tb) * pow2(tb));
      AM_PP_TRUNC: begin
        // each row a*2^j loses its value below column ppt (floor); the row of
        // b's sign bit counts negative
        s = 0;
        for (int j = 0; j < wb; j++) begin
          if (((b >> j) & 1) != 0) begin
            if (j == wb - 1) s -= floordiv2(a * pow2(j), ppt) * pow2(ppt);
            else             s += floordiv2(a * pow2(j), ppt) * pow2(ppt);
          end
        end
        return s;
      end
      default: begin  // DRUM
        ma = (a < 0) ? -a : a;
        mb = (b < 0) ? -b : b;
        la = -1; lb = -1;
        for (int i = 0; i < 63; i++) begin
          if (ma >= pow2(i)) la = i;
          if (mb >= pow2(i)) lb = i;
        end
        sa = (la >= k) ? la - k + 1 : 0;
        sb = (lb >= k) ? lb - k + 1 : 0;
        pa = ma / pow2(sa); if (sa > 0) pa = pa | 1;
        pb = mb / pow2(sb); if (sb > 0) pb = pb | 1;
        s = pa * pb * pow2(sa + sb);
        return ((a < 0) != (b < 0)) ? -s : s;
      end
    endcase
  endfunction

  typedef struct {
    approx_method_t m;
    int t_esac, t_fsac, t_emac, t_fmac, ppt, k;
  } cfg_t;

  function automatic cfg_t exact_cfg();
    cfg_t c;
    c.m = AM_EXACT; c.t_esac = 0; c.t_fsac = 0; c.t_emac = 0; c.t_fmac = 0; c.ppt = 0; c.k = 8;
    return c;
  endfunction

  typedef struct { longint e_sac, f_sac, e_mac, f_mac; } z_t;
  typedef struct { longint sac, mr, mi; } terms_t;

  function automatic z_t ep(longint a, longint b, longint c, longint d);
    z_t z;
    longint ac, bd, ad, bc, e, f;
    ac = rq(a * c, A_FL + C_FL, AC_WL, AC_FL);
    bd = rq(b * d, B_FL + D_FL, BD_WL, BD_FL);
    ad = rq(a * d, A_FL + D_FL, AD_WL, AD_FL);
    bc = rq(b * c, B_FL + C_FL, BC_WL, BC_FL);
    e = ac - bd;   // FL 25, no overflow in 64 bits
    f = ad + bc;   // FL 26
    z.e_sac = rq(e, AC_FL, ESAC_WL, ESAC_FL);
    z.f_sac = rq(f, AD_FL, FSAC_WL, FSAC_FL);
    z.e_mac = rq(e, AC_FL, EMAC_WL, EMAC_FL);
    z.f_mac = rq(f, AD_FL, FMAC_WL, FMAC_FL);
    return z;
  endfunction

  function automatic longint sac_term(longint es, longint fs, cfg_t c);
    longint esq, fsq;
    esq = rq(mult(es, es, ESAC_WL, ESAC_WL, c.m, c.t_esac, c.t_esac, c.ppt, c.k), 2*ESAC_FL, ESQ_WL, ESQ_FL);
    fsq = rq(mult(fs, fs, FSAC_WL, FSAC_WL, c.m, c.t_fsac, c.t_fsac, c.ppt, c.k), 2*FSAC_FL, FSQ_WL, FSQ_FL);
    return rq(wrap(esq + fsq, ESQF_WL), ESQF_FL, SAC_WL, SAC_FL);
  endfunction

  function automatic void mac_term(longint em, longint fm, longint h, longint t, cfg_t c,
                                   output longint tr, output longint ti);
    longint eh, ft, et, fh;
    eh = rq(mult(em, h, EMAC_WL, H_WL, c.m, c.t_emac, 0, c.ppt, c.k), EMAC_FL + H_FL, EH_WL, EH_FL);
    ft = rq(mult(fm, t, FMAC_WL, T_WL, c.m, c.t_fmac, 0, c.ppt, c.k), FMAC_FL + T_FL, FT_WL, FT_FL);
    et = rq(mult(em, t, EMAC_WL, T_WL, c.m, c.t_emac, 0, c.ppt, c.k), EMAC_FL + T_FL, ET_WL, ET_FL);
    fh = rq(mult(fm, h, FMAC_WL, H_WL, c.m, c.t_fmac, 0, c.ppt, c.k), FMAC_FL + H_FL, FH_WL, FH_FL);
    tr = rq(wrap(eh - ft, EHMFT_WL), EHMFT_FL, MACR_WL, MACR_FL);
    ti = rq(wrap(et + fh, ETPFH_WL), ETPFH_FL, MACI_WL, MACI_FL);
  endfunction

  // Saturating signed division giving qf fractional bits.
  function automatic longint div(longint num, int nf, longint den, int df, int qw, int qf);
    longint n, q, qmax, qmin;
    qmax = pow2(qw - 1) - 1;
    qmin = -pow2(qw - 1);
    n = num * pow2(qf + df - nf);
    if (den == 0) return (num < 0) ? qmin : qmax;
    q = n / den;
    if (q > qmax) q = qmax;
    if (q < qmin) q = qmin;
    return q;
  endfunction

  // The three accumulator sums of one gain from n terms, starting at zero.
  function automatic void sums(input longint a[], input longint b[], input longint c[],
                               input longint d[], input longint h[], input longint t[],
                               input int n, input cfg_t cf,
                               output longint mr, output longint mi, output longint sac);
    longint tr, ti;
    z_t z;
    sac = 0; mr = 0; mi = 0;
    for (int i = 0; i < n; i++) begin
      z = ep(a[i], b[i], c[i], d[i]);
      sac = wrap(sac + sac_term(z.e_sac, z.f_sac, cf), SAC_WL);
      mac_term(z.e_mac, z.f_mac, h[i], t[i], cf, tr, ti);
      mr = wrap(mr + tr, MACR_WL);
      mi = wrap(mi + ti, MACI_WL);
    end
  endfunction

  // One gain from n terms: returns real and imaginary part of g_p.
  function automatic void gain(input longint a[], input longint b[], input longint c[],
                               input longint d[], input longint h[], input longint t[],
                               input int n, input cfg_t cf,
                               input longint bias_mr, input longint bias_mi, input longint bias_sac,
                               output longint g_re, output longint g_im);
    longint sac, mr, mi, tr, ti;
    z_t z;
    sac = bias_sac; mr = bias_mr; mi = bias_mi;
    for (int i = 0; i < n; i++) begin
      z = ep(a[i], b[i], c[i], d[i]);
      sac = wrap(sac + sac_term(z.e_sac, z.f_sac, cf), SAC_WL);
      mac_term(z.e_mac, z.f_mac, h[i], t[i], cf, tr, ti);
      mr = wrap(mr + tr, MACR_WL);
      mi = wrap(mi + ti, MACI_WL);
    end
    g_re = div(mr, MACR_FL, sac, SAC_FL, A_WL, A_FL);
    g_im = div(mi, MACI_FL, sac, SAC_FL, B_WL, B_FL);
  endfunction

  // Signed random integer uniformly in [-2^(w-1), 2^(w-1)).
  function automatic longint rnd(int w);
    longint r;
    r = longint'({$urandom, $urandom});
    return wrap(r, w);
  endfunction
endpackage
