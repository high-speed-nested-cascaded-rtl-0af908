// Shared constants and slicing arithmetic for the nested cascaded MASH.
//
// The modulator word of M_BITS bits is cut into N_LEVELS slices, one per
// level of the cascade. Level 1 holds the most significant slice and level
// N_LEVELS the least significant one, so that the input of level k is the
// digit x_k of x = sum_k x_k * prod_{q>k} M_q with M_q = 2**width(q).
// When N_LEVELS divides M_BITS every slice has M_BITS/N_LEVELS bits. Otherwise
// the widths differ by at most one bit, so that the widest slice, which sets
// the worst-case adder delay, is ceil(M_BITS/N_LEVELS) bits; the extra bits go
// to the upper levels (a choice of this design, the split is not prescribed).
package nc_mash_pkg;

  // Number of first-order stages of the default modulator: MASH 1-1-1.
  localparam int unsigned MASH_ORDER = 3;

  // The output of a MASH of order L spans -(2**(L-1) - 1) .. 2**(L-1); as a
  // two's complement number it needs L+1 bits (4 bits, -3..+4, for 1-1-1).
  function automatic int unsigned out_width(int unsigned order);
    return order + 1;
  endfunction

  // Width in bits of the slice handled by level k (1 = most significant).
  function automatic int unsigned slice_width(int unsigned m_bits, int unsigned n_levels,
                                              int unsigned k);
    int unsigned base, extra;
    base  = m_bits / n_levels;
    extra = m_bits % n_levels;
    return (k <= extra) ? base + 1 : base;
  endfunction

  // Bit position of the least significant bit of level k's slice.
  function automatic int unsigned slice_lsb(int unsigned m_bits, int unsigned n_levels,
                                            int unsigned k);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned q = k + 1; q <= n_levels; q++) lsb += slice_width(m_bits, n_levels, q);
    return lsb;
  endfunction

endpackage
