// azpf_ref_pkg: bit-exact reference model of the AzPF arithmetic, written
// straight from the equations (not from the RTL structure), for the
// testbenches.
//   demodulation   s = code - 128, I(p) = s(2p)(-1)^p, Q(p) = -s(2p+1)(-1)^p
//   half-band      Qf(p) = sat10( sum_k c(k) Q(p+3-k) >>> 8 ), k = 0..7,
//                  c = -3 12 -39 157 157 -39 12 -3, Q = 0 outside the line
//                  If(p) = I(p)
//   azimuth        term = sat16((x * h) >>> shift), y = saturating sum of the
//                  4M terms, oldest line with h(0), output y >>> 4
package azpf_ref_pkg;

  function automatic int sat(input longint v, input int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return int'(hi);
    if (v < lo) return int'(lo);
    return int'(v);
  endfunction

  function automatic int hb_c(input int k);
    int c [8] = '{-3, 12, -39, 157, 157, -39, 12, -3};
    return c[k];
  endfunction

  // x: ns offset-binary codes; bi/bq: ns/2 filtered baseband values
  function automatic void baseband(input int x[], output int bi[], output int bq[]);
    int np, qraw[];
    np = x.size() / 2;
    bi = new[np];
    bq = new[np];
    qraw = new[np];
    for (int p = 0; p < np; p++) begin
      int se, so, sg;
      se = x[2*p] - 128;
      so = x[2*p+1] - 128;
      sg = (p % 2 == 0) ? 1 : -1;
      bi[p]   = se * sg;
      qraw[p] = -so * sg;
    end
    for (int p = 0; p < np; p++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < 8; k++) begin
        int idx;
        idx = p + 3 - k;
        if (idx >= 0 && idx < np) acc += longint'(hb_c(k)) * qraw[idx];
      end
      bq[p] = sat(acc >>> 8, 10);
    end
  endfunction

  function automatic int az_term(input int x, input int h, input int shift);
    return sat(longint'(x * h) >>> shift, 16);
  endfunction

  // one azimuth output value from 4M line values (oldest first) and taps h
  function automatic int az_out(input int xs[], input int h[], input int shift);
    int acc;
    acc = az_term(xs[0], h[0], shift);
    for (int t = 1; t < xs.size(); t++)
      acc = sat(longint'(acc) + az_term(xs[t], h[t], shift), 16);
    return acc >>> 4;
  endfunction

endpackage
