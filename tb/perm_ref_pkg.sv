// perm_ref_pkg: reference models for the permutation testbenches.
//
// decode() turns an index into its permutation of the identity by plain
// division: digit s_i = index / i!, remainder carried on, and the digit-th
// still unused element taken next.  It shares no code with the hardware,
// which uses comparisons and subtraction.  pack() builds the packed word the
// hardware emits (position 0 in the most significant slice).  The widths are
// generous: 320 bits for the index, 512 bits for a packed permutation.
package perm_ref_pkg;

  typedef logic [319:0] big_t;
  typedef logic [511:0] word_t;

  function automatic big_t fact(int k);
    big_t f = 1;
    for (int i = 2; i <= k; i++) f = f * big_t'(i);
    return f;
  endfunction

  // Permutation of the identity on n elements with the given index.
  function automatic void decode(input int n, input big_t index, output int perm[]);
    int rem[$];
    big_t v = index;
    perm = new[n];
    for (int e = 0; e < n; e++) rem.push_back(e);
    for (int pos = 0; pos < n; pos++) begin
      big_t f = fact(n - 1 - pos);
      int d = int'(v / f);
      v = v % f;
      perm[pos] = rem[d];
      rem.delete(d);
    end
  endfunction

  // Packed word of a permutation, w bits per element, position 0 first (MSB).
  function automatic word_t pack(input int perm[], input int w);
    word_t v = '0;
    foreach (perm[pos]) v = (v << w) | word_t'(perm[pos]);
    return v;
  endfunction

  // Element at position pos of a packed word of n elements, w bits each.
  function automatic int elem(input word_t v, input int n, input int w, input int pos);
    return int'((v >> ((n - 1 - pos) * w)) & ((word_t'(1) << w) - 1));
  endfunction

  // 1 when the packed word holds each of 0..n-1 exactly once.
  function automatic bit is_perm(input word_t v, input int n, input int w);
    bit seen[int];
    for (int pos = 0; pos < n; pos++) begin
      int e = elem(v, n, w, pos);
      if (e >= n || seen.exists(e)) return 1'b0;
      seen[e] = 1'b1;
    end
    return 1'b1;
  endfunction

  // Position of a permutation word of 4 elements (2 bits each) in
  // lexicographic order, used as a histogram bin: 0 for 0123 ... 23 for 3210.
  function automatic int rank4(input logic [7:0] v);
    int rem[$] = '{0, 1, 2, 3};
    int r = 0;
    for (int pos = 0; pos < 4; pos++) begin
      int e = int'(v[7-2*pos -: 2]);
      int d = 0;
      foreach (rem[q]) if (rem[q] == e) d = q;
      r = r + d * int'(fact(3 - pos));
      rem.delete(d);
    end
    return r;
  endfunction

endpackage
