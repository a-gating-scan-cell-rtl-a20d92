// gsc_pkg -- shared constants and helper functions of the gating scan chain.
//
// The gating scan cell shifts through its inverted output Qbar, so every
// cell of a chain inverts the bit that passes through it.  A bit that ends
// up in cell i (cell 0 sits next to the chain's scan input) has been
// inverted i+1 times when it is seen at that cell's Qbar and i+2 times when
// it is seen at Q.  The "adaptive" test vector pre-inverts every other bit so
// that after the shift-in the whole vector stands in one polarity, and the
// scanned-out response is corrected the same way.  These functions give the
// per-bit inversion masks; the rule is the alternating pattern of the
// adaptive scan process, generalised here from a five-cell example to any
// chain length.
package gsc_pkg;

  // Default chain length: the five-cell example of the adaptive scan process.
  localparam int unsigned DEFAULT_SCAN_LEN = 5;

  // Where the shifted-in test vector must stand in true polarity.
  typedef enum logic {
    LOAD_AT_Q    = 1'b0,  // the combinational logic sees the vector at Q
    LOAD_AT_QBAR = 1'b1   // the vector stands at the inverted output Qbar
  } load_target_e;

  // 1 when test-vector bit `idx` (cell index, 0 next to SI) must be
  // complemented in the adaptive vector.
  function automatic logic adaptive_flip(int unsigned idx, load_target_e target);
    if (target == LOAD_AT_QBAR) return (idx % 2) == 0;  // idx+1 inversions
    else                        return (idx % 2) == 1;  // idx+2 inversions
  endfunction

  // 1 when the j-th bit seen at SO after capture (j = 0 first, before any
  // shift) is the complement of the response captured at Q: the bit was
  // captured inverted at Qbar and then crossed j more cells.
  function automatic logic response_flip(int unsigned j);
    return (j % 2) == 0;
  endfunction

endpackage
