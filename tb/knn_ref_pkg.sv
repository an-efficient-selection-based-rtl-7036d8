// knn_ref_pkg: reference arithmetic for the kNN testbenches.
//
// Computes the expected squared distance the way the hardware defines it,
// with plain integers: each term (q - t)^2 is formed exactly, its 18
// fraction bits beyond <6,18> are dropped, the terms are summed, and the
// sum saturates at 2^24 - 1. ref_knn runs the whole classification on
// dynamic arrays: distances, the K-register selection with the V1/V2 split
// (optionally stopping at the first V2 element not below minK), and the
// majority vote (ties to the lower class). Also holds a random feature
// generator.
package knn_ref_pkg;
  import knn_pkg::*;

  function automatic longint ref_term(feat_t a, feat_t b);
    longint d;
    d = longint'(a) - longint'(b);
    return (d * d) >>> FRAC;
  endfunction

  function automatic dist_t ref_sat(longint s);
    return (s > longint'(DIST_MAX)) ? DIST_MAX : dist_t'(s);
  endfunction

  // random signed feature of 'bits' bits (FRAC + 1 gives about +-1.0)
  function automatic feat_t rand_feat(int unsigned bits);
    logic [31:0] r;
    r = $urandom;
    return feat_t'($signed(r) >>> (32 - bits));
  endfunction

  typedef feat_t sample_t [];

  function automatic dist_t ref_dist(const ref feat_t q [], const ref feat_t t []);
    longint acc = 0;
    foreach (q[f]) acc += ref_term(q[f], t[f]);
    return ref_sat(acc);
  endfunction

  // nn: the K nearest (nearest first); v2ins: V2 elements inserted;
  // stop: index where an early-out scan stopped, -1 if it ran to the end
  task automatic ref_knn(input sample_t train [], input logic [CLS_W-1:0] cls [],
                         input feat_t q [], input int k, input int s1, input bit abort_mode,
                         output dm_entry_t nn [], output int v2ins, output int stop,
                         output logic [CLS_W-1:0] cls_out, output int n_sat);
    int cnt [N_CLASS];
    nn = new[k];
    foreach (nn[p]) nn[p] = '{distance: DIST_MAX, cls: '0};
    v2ins = 0; stop = -1; n_sat = 0;
    foreach (train[i]) begin
      dm_entry_t e;
      int pos;
      e = '{distance: ref_dist(q, train[i]), cls: cls[i]};
      if (e.distance == DIST_MAX) n_sat++;
      pos = k;
      for (int p = k - 1; p >= 0; p--) if (e.distance < nn[p].distance) pos = p;
      if (i >= s1 && pos == k) begin
        if (abort_mode) begin stop = i; break; end
        continue;
      end
      if (pos < k) begin
        for (int p = k - 1; p > pos; p--) nn[p] = nn[p-1];
        nn[pos] = e;
        if (i >= s1) v2ins++;
      end
    end
    foreach (cnt[c]) cnt[c] = 0;
    foreach (nn[p]) cnt[nn[p].cls]++;
    cls_out = '0;
    for (int c = 1; c < N_CLASS; c++) if (cnt[c] > cnt[cls_out]) cls_out = CLS_W'(c);
  endtask
endpackage
