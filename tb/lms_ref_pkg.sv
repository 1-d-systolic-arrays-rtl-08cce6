// lms_ref_pkg: behavioural reference for the LMS systolic arrays, written at
// the algorithm level with 64-bit integers (independent of the RTL helpers).
//
// A stream of items j = 0..J-1 (one per clock, or one per accepted sample for
// arrays that stall) carries u[j], d[j] and valid[j]. With S the item
// distance between successive taps and lag[i] the number of items by which
// tap i's coefficient trails the errors:
//   y[j]   = sum_i  W_i(j - lag[i]) * u[j - S*i]          (taps i = 0..M-1)
//   e[j]   = d[j] - y[j]
//   W_i(x) = sum over valid j' < x of  mu * u[j' - S*i] * e[j']
// with all weights zero at reset. Widths and truncations follow the number
// formats of the design (u, d: 16 bits with 12 fraction bits; y, e: 24/12;
// w: 24/20; mu: Q1.15).
package lms_ref_pkg;
  function automatic longint sx(longint v, int bits);
    longint m;
    m = (longint'(1) <<< bits) - 1;
    v = v & m;
    if (v[bits-1]) v = v - (longint'(1) <<< bits);
    return v;
  endfunction

  function automatic longint ref_ips(longint w, longint u);
    return (w * u) >>> 20;
  endfunction

  function automatic longint ref_corr(longint mu, longint u, longint e);
    longint q;
    q = sx((mu * u) >>> 15, 16);
    return sx((q * e) >>> 4, 24);
  endfunction

  class lms_ref;
    int     M, S;
    int     lag[];
    longint mu;
    longint u[$], d[$];
    bit     valid[$];
    longint y[$], e[$];
    longint wsnap[$][];   // wsnap[x][i] = W_i(x)

    function new(int m, int s, int lags[], longint mu_v);
      longint w0[];
      M = m; S = s; lag = lags; mu = mu_v;
      w0 = new[M];
      foreach (w0[i]) w0[i] = 0;
      wsnap.push_back(w0);
    endfunction

    function longint u_at(int j);
      return (j < 0) ? 0 : u[j];
    endfunction

    // Append one item and compute its output and error.
    function void push(longint uu, longint dd, bit vv);
      int j;
      longint acc, ee;
      longint wn[];
      j = u.size();
      u.push_back(vv ? uu : 0); d.push_back(dd); valid.push_back(vv);
      acc = 0;
      for (int i = 0; i < M; i++) begin
        longint wi;
        wi = (j - lag[i] < 0) ? 0 : wsnap[j - lag[i]][i];
        acc = acc + ref_ips(wi, u_at(j - S*i));
      end
      acc = sx(acc, 24);
      ee  = sx(dd - acc, 24);
      y.push_back(acc); e.push_back(ee);
      wn = new[M];
      for (int i = 0; i < M; i++)
        wn[i] = vv ? sx(wsnap[j][i] + ref_corr(mu, u_at(j - S*i), ee), 24) : wsnap[j][i];
      wsnap.push_back(wn);
    endfunction

    function longint w_now(int i);
      return wsnap[wsnap.size()-1][i];
    endfunction
  endclass
endpackage
