// md_ref_pkg: reference model of the multithreading-degree decision, used
// by the testbenches to work out expected results. It restates the scheme
// with plain integer arithmetic (12 fraction bits, results rounded down)
// from its definition, not from the RTL.
package md_ref_pkg;
  localparam longint Q = 4096;

  function automatic longint ref_m1(longint dr, longint acc);
    longint m;
    if (acc == 0) return 0;
    m = (dr * Q) / acc;
    return (m > Q) ? Q : m;
  endfunction

  // predicted miss rate with n CTAs sharing a cache of c lines
  function automatic longint ref_mn(longint m1, longint ws, longint n, longint c);
    longint wsn, keep, evict, m;
    wsn = ws * n;
    if (wsn > 64'hffff_ffff) wsn = 64'hffff_ffff;
    if (wsn <= c) return (m1 > Q) ? Q : m1;
    keep  = (c * Q) / wsn;
    if (keep > Q) keep = Q;
    evict = Q - keep;
    m = m1 + (((Q - m1) * evict) / Q);
    return (m > Q) ? Q : m;
  endfunction

  function automatic longint ref_drn(longint acc, longint m);
    longint d;
    d = (acc * m) / Q;
    return (d > 64'hffff_ffff) ? 64'hffff_ffff : d;
  endfunction

  function automatic longint ref_lat(longint m, longint mp, longint wsn, longint c);
    longint dm;
    dm = (m > mp) ? m - mp : 0;
    if (m < 614 || m > 3482) return 4219;          // 1.03
    if (m < 1229)            return 4506;          // 1.1
    if (wsn > 5 * c && dm > 410)  return 7782;     // 1.9
    if (wsn > 15 * c && dm > 164) return 7168;     // 1.75
    return 4506;                                   // 1.1
  endfunction

  function automatic longint ref_pipe(longint wsn, longint drn, longint c);
    if (wsn < c)     return 4301;                  // 1.05
    if (drn > 5 * c) return 4915;                  // 1.2
    return 4506;                                   // 1.1
  endfunction

  // chosen degree; compute_bound returned through cb
  function automatic int ref_md(longint acc, longint dr, longint winst, longint ws,
                                longint c, int maxmd, output bit cb);
    longint m1, m, mp, wsn, drn, g, cost, best_cost;
    int best;
    m1 = ref_m1(dr, acc);
    cb = (dr * 20 < winst);
    if (cb) return maxmd;
    best = 1; best_cost = 0; g = Q; mp = 0;
    for (int n = 1; n <= maxmd; n++) begin
      m   = ref_mn(m1, ws, n, c);
      wsn = ws * n;
      if (wsn > 64'hffff_ffff) wsn = 64'hffff_ffff;
      drn = ref_drn(acc, m);
      if (n > 1) begin
        g = (g * ref_lat(m, mp, wsn, c) * ref_pipe(wsn, drn, c)) / (Q * Q);
        if (g > 64'h00ff_ffff_ffff) g = 64'h00ff_ffff_ffff;
      end
      cost = ((m == 0) ? 1 : m) * g;
      if (n == 1 || n * best_cost > best * cost) begin
        best = n; best_cost = cost;
      end
      mp = m;
    end
    return best;
  endfunction
endpackage
