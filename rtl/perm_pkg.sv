// perm_pkg: constants and constant functions shared by the permutation
// generators.
//
// A permutation on n elements is carried as a packed array
// logic [n-1:0][w-1:0] with w = ceil(log2 n) bits per element; position p of
// the permutation is slice [n-1-p].  Position 0, the leftmost element of the
// permutation as it is written (for example the "2" of 2103), therefore sits
// in the most significant bits, so the 4-element identity
// 0123 reads as the 8-bit word 00 01 10 11 = 27.  This is the word layout the
// paper uses for its bar chart of generated permutations.
//
// Factorials and the index width are computed here at elaboration time in a
// FACT_W-bit wide arithmetic, which is enough for n up to 64 (64! needs 296
// bits).  The LFSR feedback taps are the usual maximal-length (primitive)
// trinomials and pentanomials; the choice of polynomial is this design's own,
// the paper only asks for an LFSR that runs through every non-zero m-bit word.
package perm_pkg;

  // Width of the wide constant arithmetic (factorials, the constant k).
  localparam int FACT_W = 320;
  typedef logic [FACT_W-1:0] wide_t;

  // k! in FACT_W bits.
  function automatic wide_t fact(int k);
    wide_t f = wide_t'(1);
    for (int i = 2; i <= k; i++) f = f * wide_t'(i);
    return f;
  endfunction

  // Number of bits needed to hold every value 0 .. v-1 (at least 1).
  function automatic int clog2_wide(wide_t v);
    wide_t t = v - wide_t'(1);
    int w = 0;
    while (t != '0) begin
      t = t >> 1;
      w++;
    end
    return (w < 1) ? 1 : w;
  endfunction

  // Number of bits of v itself (at least 1).
  function automatic int bitlen_wide(wide_t v);
    wide_t t = v;
    int w = 0;
    while (t != '0) begin
      t = t >> 1;
      w++;
    end
    return (w < 1) ? 1 : w;
  endfunction

  // Index width for n-element permutations: ceil(log2 n!).
  function automatic int idx_width(int n);
    return clog2_wide(fact(n));
  endfunction

  // Element width: ceil(log2 n), one bit at least.
  function automatic int elem_width(int n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction

  // Feedback taps of an m-bit Fibonacci LFSR (bit i set = stage i+1 tapped),
  // maximal length for 3 <= m <= 32.
  function automatic logic [31:0] lfsr_taps(int m);
    logic [31:0] t = '0;
    case (m)
      3:  t = (1 << 2) | (1 << 1);
      4:  t = (1 << 3) | (1 << 2);
      5:  t = (1 << 4) | (1 << 2);
      6:  t = (1 << 5) | (1 << 4);
      7:  t = (1 << 6) | (1 << 5);
      8:  t = (1 << 7) | (1 << 5) | (1 << 4) | (1 << 3);
      9:  t = (1 << 8) | (1 << 4);
      10: t = (1 << 9) | (1 << 6);
      11: t = (1 << 10) | (1 << 8);
      12: t = (1 << 11) | (1 << 5) | (1 << 3) | (1 << 0);
      13: t = (1 << 12) | (1 << 3) | (1 << 2) | (1 << 0);
      14: t = (1 << 13) | (1 << 4) | (1 << 2) | (1 << 0);
      15: t = (1 << 14) | (1 << 13);
      16: t = (1 << 15) | (1 << 14) | (1 << 12) | (1 << 3);
      17: t = (1 << 16) | (1 << 13);
      18: t = (1 << 17) | (1 << 10);
      19: t = (1 << 18) | (1 << 5) | (1 << 1) | (1 << 0);
      20: t = (1 << 19) | (1 << 16);
      21: t = (1 << 20) | (1 << 18);
      22: t = (1 << 21) | (1 << 20);
      23: t = (1 << 22) | (1 << 17);
      24: t = (1 << 23) | (1 << 22) | (1 << 21) | (1 << 16);
      25: t = (1 << 24) | (1 << 21);
      26: t = (1 << 25) | (1 << 5) | (1 << 1) | (1 << 0);
      27: t = (1 << 26) | (1 << 4) | (1 << 1) | (1 << 0);
      28: t = (1 << 27) | (1 << 24);
      29: t = (1 << 28) | (1 << 26);
      30: t = (1 << 29) | (1 << 5) | (1 << 3) | (1 << 0);
      31: t = (1 << 30) | (1 << 27);
      32: t = (1 << 31) | (1 << 21) | (1 << 1) | (1 << 0);
      default: t = '0;
    endcase
    return t;
  endfunction

  // Per-stage seed derived from a base seed: never zero, so no LFSR can lock.
  function automatic logic [31:0] stage_seed(logic [31:0] base, int j, int m);
    logic [31:0] mask = (m >= 32) ? 32'hFFFF_FFFF : ((32'd1 << m) - 32'd1);
    logic [31:0] s = (base ^ (32'h9E37_79B9 * 32'(j + 1))) & mask;
    return (s == '0) ? 32'd1 : s;
  endfunction

endpackage
