// knn_tb_pkg: reference model of the KNN classifier used by the system
// testbenches. It works from the per-element partial distances D[] (sum of
// squared component differences over all loads), the switch settings cs[]
// and the labels at the vector tails, and computes, without any of the RTL's
// structure:
//   - the vectors (element runs ending where cs = 0 or at the last element),
//   - the nearest vector set (all vectors at minimum distance),
//   - the k vectors that vote (ascending distance, lower index first),
//   - the majority class (lowest class number on equal votes),
//   - the clock count of the bit-serial search: at bit b every unfinished
//     vector advances by 2^b per counting clock, all from the same count C,
//     so bit b costs (min_v sum_j trunc_b(D_j) - C) / 2^b counting clocks,
//     plus one BAS clock for every bit above the LSB.
package knn_tb_pkg;

  typedef struct {
    bit    nn  [];   // per element index: tail of a nearest vector
    bit    sel [];   // per element index: tail of a voting vector
    int    cls;
    int    clocks;
    int    nvec;
  } result_t;

  function automatic longint trunc(input longint v, input int b);
    return (v >> b) << b;
  endfunction

  function automatic result_t model(input longint D [], input bit cs [], input int lab [],
                                    input int k, input int top);
    result_t r;
    int ne, head, nv, cnt [8], best;
    int tails [$], heads [$];
    longint vd [$];
    bit used [];
    longint C, tmin, t;
    ne = D.size();
    r.nn  = new[ne];
    r.sel = new[ne];
    used  = new[ne];
    head = 0;
    for (int e = 0; e < ne; e++)
      if (e == ne - 1 || !cs[e]) begin
        longint s;
        s = 0;
        for (int j = head; j <= e; j++) s += D[j];
        tails.push_back(e); heads.push_back(head); vd.push_back(s);
        head = e + 1;
      end
    nv = tails.size();
    r.nvec = nv;
    tmin = vd[0];
    foreach (vd[v]) if (vd[v] < tmin) tmin = vd[v];
    foreach (vd[v]) if (vd[v] == tmin) r.nn[tails[v]] = 1;
    // k nearest, ties by index
    for (int c = 0; c < 8; c++) cnt[c] = 0;
    for (int n = 0; n < k && n < nv; n++) begin
      int bv;
      bv = -1;
      for (int v = 0; v < nv; v++)
        if (!used[v] && (bv < 0 || vd[v] < vd[bv])) bv = v;
      used[bv] = 1;
      r.sel[tails[bv]] = 1;
      cnt[lab[tails[bv]]]++;
    end
    best = -1; r.cls = 0;
    for (int c = 0; c < 8; c++) if (cnt[c] > best) begin best = cnt[c]; r.cls = c; end
    // search clocks up to the first LSB match
    C = 0; r.clocks = 0;
    for (int b = top; b >= 0; b--) begin
      tmin = -1;
      for (int v = 0; v < nv; v++) begin
        t = 0;
        for (int j = heads[v]; j <= tails[v]; j++) t += trunc(D[j], b);
        if (tmin < 0 || t < tmin) tmin = t;
      end
      r.clocks += int'((tmin - C) >> b);
      C = tmin;
      if (b > 0) r.clocks++;
    end
    return r;
  endfunction

endpackage
