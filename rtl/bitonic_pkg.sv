// Shared constants and elaboration-time functions of the streaming bitonic sorter.
//
// Data layout. Inside one N-key sequence a key has a logical index x (n = log2 N bits).
// On the stream it sits at position y = {cycle, lane}: the low b = log2 p bits of y are
// the lane, the high n-b bits the cycle within the sequence. Comparison stage s compares
// the keys whose indices differ in bit j(s). That stage sees the keys in layout L_j, in
// which y is x with bits 0 and j exchanged, so the two partners of every comparison sit
// in lanes 2k and 2k+1 of the same cycle. The streaming permutation network between
// stage s and stage s+1 therefore applies the bit permutation "exchange bits 0 and j(s),
// then exchange bits 0 and j(s+1)" to the stream positions. Layout L_0 is the natural
// order, so keys enter and leave the sorter in natural order.
//
// The stage order is the classic one: merge phases i = 1..n, and in phase i the compared
// bit j runs from i-1 down to 0. Keys whose index bit i is 1 are merged in descending
// order, all others ascending (bit n is always 0, so the last phase is ascending).
//
// All functions below are evaluated at elaboration time only.
package bitonic_pkg;

  // Exchange bit positions 0 and j: the index a bit at position k moves to.
  function automatic int swp(input int k, input int j);
    if (k == 0) return j;
    if (k == j) return 0;
    return k;
  endfunction

  // Bit permutation of a streaming permutation network that goes from layout L_jf to
  // layout L_jt: bit k of the input position becomes bit spn_perm(k) of the output position.
  function automatic int spn_perm(input int k, input int jf, input int jt);
    return swp(swp(k, jf), jt);
  endfunction

  // Inverse of spn_perm.
  function automatic int spn_iperm(input int k, input int jf, input int jt);
    return swp(swp(k, jt), jf);
  endfunction

  // Highest position bit the permutation moves (-1 for the identity).
  function automatic int spn_top_bit(input int jf, input int jt);
    int m;
    m = -1;
    for (int k = 0; k < 32; k++)
      if (spn_perm(k, jf, jt) != k) m = k;
    return m;
  endfunction

  // Number of cycle-index bits the permutation in time spans (0: spatial only).
  function automatic int spn_time_bits(input int b, input int jf, input int jt);
    int m;
    m = spn_top_bit(jf, jt);
    return (m < b) ? 0 : m + 1 - b;
  endfunction

  // The lane bit that the permutation sends into the cycle index (-1 if none).
  function automatic int spn_pair_lane(input int b, input int jf, input int jt);
    for (int k = 0; k < b; k++)
      if (spn_perm(k, jf, jt) >= b) return k;
    return -1;
  endfunction

  // The cycle-index bit (as a position bit, >= b) that the permutation sends into the lane
  // index (-1 if none). For the permutations of this sorter at most one such pair exists.
  function automatic int spn_pair_time(input int b, input int jf, input int jt);
    for (int k = b; k < 32; k++)
      if (spn_perm(k, jf, jt) < b) return k;
    return -1;
  endfunction

  // Source table of the permutation in time Q: bit z of the input cycle of the key that a
  // memory bank returns in output cycle k' is bit spn_qsrc(z) of k' (apart from the bank
  // dependent offset applied on the paired bit, see spn).
  function automatic int spn_qsrc(input int z, input int b, input int jf, input int jt);
    int c;
    c = spn_pair_time(b, jf, jt);
    if (c == b + z) return spn_perm(spn_pair_lane(b, jf, jt), jf, jt) - b;
    return spn_perm(b + z, jf, jt) - b;
  endfunction

  // Number of comparison stages, log N (log N + 1) / 2.
  function automatic int num_stages(input int n);
    return n * (n + 1) / 2;
  endfunction

  // Merge phase i (1..n) of comparison stage s (0-based).
  function automatic int stage_phase(input int n, input int s);
    int idx;
    idx = 0;
    for (int i = 1; i <= n; i++)
      for (int j = i - 1; j >= 0; j--) begin
        if (idx == s) return i;
        idx++;
      end
    return n;
  endfunction

  // Compared bit j of comparison stage s.
  function automatic int stage_bit(input int n, input int s);
    int idx;
    idx = 0;
    for (int i = 1; i <= n; i++)
      for (int j = i - 1; j >= 0; j--) begin
        if (idx == s) return j;
        idx++;
      end
    return 0;
  endfunction

  // Latency in cycles of the comparison stage.
  localparam int CAS_LATENCY = 1;

  // Latency in cycles of a streaming permutation network: one output register when the
  // permutation is spatial only, otherwise one sequence of 2^D cycles in the memory plus
  // the memory read register and the output register.
  function automatic int spn_latency(input int b, input int jf, input int jt);
    int d;
    d = spn_time_bits(b, jf, jt);
    return (d == 0) ? 1 : (1 << d) + 2;
  endfunction

  // Cycles from the sorter input to the input of comparison stage s.
  function automatic int cas_in_latency(input int n, input int b, input int s);
    int l;
    l = 0;
    for (int u = 0; u < s; u++)
      l += CAS_LATENCY + spn_latency(b, stage_bit(n, u), stage_bit(n, u + 1));
    return l;
  endfunction

  // Cycles from the sorter input to its output.
  function automatic int sorter_latency(input int n, input int b);
    return cas_in_latency(n, b, num_stages(n) - 1) + CAS_LATENCY;
  endfunction

  // Key-words of memory used by all permutation networks together.
  function automatic longint sorter_mem_words(input int n, input int b);
    longint w;
    w = 0;
    for (int u = 0; u + 1 < num_stages(n); u++)
      if (spn_time_bits(b, stage_bit(n, u), stage_bit(n, u + 1)) > 0)
        w += longint'(1) << (spn_time_bits(b, stage_bit(n, u), stage_bit(n, u + 1)) + b);
    return w;
  endfunction

endpackage
