// approx_ref_pkg - bit-accurate reference models used by the testbenches.
//
// Written independently of the RTL: values are held in 64-bit integers and
// the approximate part of an adder is modelled by scanning down from its top
// bit for the first position where both operands are 1, then filling every
// bit below it with 1s. The weight rounding is modelled as "nearest value in
// {0,1,2,4,8}, larger one on a tie" by measuring distances.
package approx_ref_pkg;

  function automatic longint unsigned mask(input int unsigned n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 1);
  endfunction

  // approximate adder/subtractor of width n with ap approximate bits
  function automatic longint unsigned addsub(input longint unsigned a, input longint unsigned b,
                                             input bit sub, input int unsigned n,
                                             input int unsigned ap);
    longint unsigned bb, hi, lo;
    bit fill;
    a  = a & mask(n);
    bb = (sub ? ~b : b) & mask(n);
    if (ap == 0) return (a + bb + longint'(sub)) & mask(n);
    hi = ((a >> ap) + (bb >> ap)) << ap;
    lo = 0;
    fill = 0;
    for (int k = int'(ap) - 1; k >= 0; k--) begin
      if (a[k] && bb[k]) fill = 1;
      if (fill || (a[k] != bb[k])) lo |= (64'd1 << k);
    end
    return (hi | lo) & mask(n);
  endfunction

  // sign-extend an n-bit pattern
  function automatic longint sext(input longint unsigned v, input int unsigned n);
    longint unsigned m = mask(n);
    v &= m;
    if (v[n-1]) return longint'(v | ~m);
    return longint'(v);
  endfunction

  // nearest of {0,1,2,4,8} to u, ties to the larger
  function automatic int unsigned round_unit(input int unsigned u);
    int unsigned cand [5] = '{0, 1, 2, 4, 8};
    int unsigned best = 0;
    int best_d = 1000;
    foreach (cand[i]) begin
      int d = (int'(u) > int'(cand[i])) ? int'(u) - int'(cand[i]) : int'(cand[i]) - int'(u);
      if (d <= best_d) begin best_d = d; best = cand[i]; end
    end
    return best;
  endfunction

  // rounded weight magnitude as the neuron uses it
  function automatic int unsigned rounded_mag(input int w);
    int unsigned m = (w < 0) ? -w : w;
    return round_unit(m / 16) * 16 + round_unit(m % 16);
  endfunction

  // neuron: x * rounded(w), the two terms added approximately, sign applied exactly
  function automatic longint unsigned neuron(input int unsigned x, input int w,
                                             input int unsigned n, input int unsigned ap);
    int unsigned m = (w < 0) ? -w : w;
    longint unsigned hi_t = longint'(x) * round_unit(m / 16) * 16;
    longint unsigned lo_t = longint'(x) * round_unit(m % 16);
    longint unsigned s = addsub(hi_t, lo_t, 0, n, ap);
    if (w < 0) s = (-s) & mask(n);
    return s;
  endfunction

  // pairwise adder tree, level l uses ap[l]; v holds nleaf values
  function automatic longint unsigned tree(input longint unsigned v [],
                                           input int unsigned ap [], input int unsigned n);
    longint unsigned cur [$];
    int l = 0;
    foreach (v[i]) cur.push_back(v[i]);
    while (cur.size() > 1) begin
      longint unsigned nxt [$];
      for (int i = 0; i < cur.size(); i += 2) begin
        if (i + 1 < cur.size()) nxt.push_back(addsub(cur[i], cur[i+1], 0, n, ap[l]));
        else nxt.push_back(cur[i]);
      end
      cur = nxt;
      l++;
    end
    return cur[0];
  endfunction

endpackage
