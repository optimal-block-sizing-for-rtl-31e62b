// csk_sizing_pkg: the block-sizing procedure for one-level carry-skip adders,
// as testbench-side software (it is not hardware).
//
// Delay model (all values in picoseconds). The carry path is made of:
//   pair      - a pair of ripple cells not at the end of a block,
//   single    - one ripple cell not at the end of a block (odd-sized blocks),
//   end_pair  - the last pair of cells of a block together with its skip
//               multiplexer,
//   end_single- a one-cell block together with its multiplexer,
//   mux       - skipping one block through its multiplexer.
// A carry generated at the least significant bit of block i and absorbed at
// the most significant bit of block j > i costs
//   src(i) + (j - i - 1) * mux + sink(j),
// where src rips through block i and its multiplexer and sink rips into
// block j without reaching its multiplexer. The carry-in behaves like a
// source of zero delay placed before block 0.
//
// procedure_p(d) builds the largest adder whose carry delay stays within d:
// a two-block nucleus of the largest equal size m, then the largest blocks
// that fit on the less significant side, one after another, then the same
// on the more significant side. The path to the carry-out is not limited,
// as its multiplexer usually drives a lighter load. min_delay(n) bisects on
// d for the fastest adder with at least n bits.
package csk_sizing_pkg;
  import csk_pkg::*;

  typedef struct packed {
    int unsigned mux;
    int unsigned pair;
    int unsigned single;
    int unsigned end_pair;
    int unsigned end_single;
  } delay_model_t;

  // 2 um CMOS component delays.
  localparam delay_model_t DM_2UM = '{mux: 1240, pair: 1550, single: 950,
                                      end_pair: 3100, end_single: 3100};
  // 1 um CMOS component delays as used for the 64-bit sizing (pair 580 ps,
  // which reproduces every delay annotated on that sizing). A one-cell block
  // at 1 um is not characterised; any value above the multiplexer delay
  // leads to the same sizing, 800 ps is used.
  localparam delay_model_t DM_1UM = '{mux: 440, pair: 580, single: 400,
                                      end_pair: 800, end_single: 800};

  function automatic int unsigned src_delay(int unsigned k, delay_model_t dm);
    if (k == 1)     return dm.end_single;
    if (k % 2 == 0) return (k / 2 - 1) * dm.pair + dm.end_pair;
    return dm.single + ((k - 3) / 2) * dm.pair + dm.end_pair;
  endfunction

  function automatic int unsigned sink_delay(int unsigned k, delay_model_t dm);
    if (k % 2 == 0) return (k / 2) * dm.pair;
    return dm.single + ((k - 1) / 2) * dm.pair;
  endfunction

  // Worst carry delay over all source/sink block pairs and the carry-in.
  function automatic int unsigned worst_delay(size_list_t s, int unsigned n,
                                              delay_model_t dm);
    int unsigned worst = 0, t;
    for (int unsigned j = 0; j < n; j++) begin
      t = j * dm.mux + sink_delay(s[j], dm);          // from the carry-in
      if (t > worst) worst = t;
      for (int unsigned i = 0; i < j; i++) begin
        t = src_delay(s[i], dm) + (j - i - 1) * dm.mux + sink_delay(s[j], dm);
        if (t > worst) worst = t;
      end
    end
    return worst;
  endfunction

  // Delay from the carry-in, or from the least significant block whose path
  // is longest, to the carry-out.
  function automatic int unsigned cout_delay(size_list_t s, int unsigned n,
                                             delay_model_t dm);
    int unsigned worst = n * dm.mux, t;
    for (int unsigned i = 0; i < n; i++) begin
      t = src_delay(s[i], dm) + (n - 1 - i) * dm.mux;
      if (t > worst) worst = t;
    end
    return worst;
  endfunction

  // Largest adder with carry delay at most d. Returns the number of blocks
  // in n and the sizes, least significant block first, in s.
  function automatic void procedure_p(int unsigned d, delay_model_t dm,
                                      output size_list_t s, output int unsigned n);
    int unsigned m = 0;
    int unsigned left [$];
    int unsigned right [$];
    size_list_t  trial;
    int unsigned tn;
    bit          grown;
    foreach (s[i]) s[i] = 0;
    n = 0;
    // Nucleus: the largest m with src(m) + sink(m) <= d.
    while (m < 64 && src_delay(m + 1, dm) + sink_delay(m + 1, dm) <= d) m++;
    if (m == 0) return;
    // Grow to the less significant side, then to the more significant side.
    for (int side = 0; side < 2; side++) begin
      grown = 1'b1;
      while (grown && (left.size() + right.size() + 2) < MAX_BLOCKS) begin
        grown = 1'b0;
        for (int unsigned k = m; k >= 1 && !grown; k--) begin
          foreach (trial[i]) trial[i] = 0;
          tn = 0;
          if (side == 0) begin trial[tn] = k; tn++; end
          foreach (left[i])  begin trial[tn] = left[i];  tn++; end
          trial[tn] = m; tn++;
          trial[tn] = m; tn++;
          foreach (right[i]) begin trial[tn] = right[i]; tn++; end
          if (side == 1) begin trial[tn] = k; tn++; end
          if (worst_delay(trial, tn, dm) <= d) begin
            if (side == 0) left.push_front(k);
            else           right.push_back(k);
            grown = 1'b1;
          end
        end
      end
    end
    foreach (left[i])  begin s[n] = left[i];  n++; end
    s[n] = m; n++;
    s[n] = m; n++;
    foreach (right[i]) begin s[n] = right[i]; n++; end
  endfunction

  // Fastest adder of at least nbits bits: the smallest d (to 1 ps) for which
  // procedure_p builds nbits or more bits, found by bisection.
  function automatic int unsigned min_delay(int unsigned nbits, delay_model_t dm);
    int unsigned lo = 0;
    int unsigned hi = nbits * dm.pair;   // generous: a plain ripple adder
    int unsigned mid, bn;
    size_list_t  bs;
    while (hi - lo > 1) begin
      mid = (lo + hi) / 2;
      procedure_p(mid, dm, bs, bn);
      if (sum_sizes(bs, bn) >= nbits) hi = mid;
      else                            lo = mid;
    end
    return hi;
  endfunction

endpackage
