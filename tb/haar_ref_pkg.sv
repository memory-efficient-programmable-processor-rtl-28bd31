// haar_ref_pkg: reference model for the testbenches, written straight from
// the definition of the normalised Haar transform, independent of the RTL.
//   H_k(i): H_0 = 1; for k > 0, p = floor(log2 k), r = k - 2**p, block
//   length L = N / 2**p: +1 on [rL, rL + L/2), -1 on [rL + L/2, (r+1)L).
//   forward  X_k = sum_i H_k(i) x_i
//   inverse  x_i = (sum_k A_k H_k(i) X_k) / N, A_0 = 1, A_k = 2**p
// The inverse reference mimics the hardware's finite widths: the sum is
// taken modulo 2**acc_w (two's complement), shifted right by log2 N with
// sign fill and cut to out_w bits.
package haar_ref_pkg;

  function automatic int ilog2(input int k);
    int p = 0;
    while ((k >> (p + 1)) != 0) p++;
    return p;
  endfunction

  function automatic int haar_h(input int k, input int i, input int n);
    int p, r, len;
    if (k == 0) return 1;
    p   = ilog2(k);
    r   = k - (1 << p);
    len = (1 << n) >> p;
    if (i >= r * len && i < r * len + len / 2) return 1;
    if (i >= r * len + len / 2 && i < (r + 1) * len) return -1;
    return 0;
  endfunction

  // Coefficient index at position t of the minimum-latency (preorder) order.
  function automatic int preorder_k(input int t, input int n);
    int u, node, h, half;
    if (t == 0) return 0;
    u    = t - 1;
    node = 1;
    h    = n;
    while (u != 0) begin
      u    = u - 1;
      half = (1 << (h - 1)) - 1;
      if (u < half) node = 2 * node;
      else begin
        u    = u - half;
        node = 2 * node + 1;
      end
      h--;
    end
    return node;
  endfunction

  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) << w) - 1);
    if (m >= (longint'(1) << (w - 1))) m = m - (longint'(1) << w);
    return m;
  endfunction

  // Coefficient weight A_k.
  function automatic longint a_k(input int k);
    return (k == 0) ? 1 : (longint'(1) << ilog2(k));
  endfunction

endpackage
