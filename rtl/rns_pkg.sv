// rns_pkg: shared definitions for the residue number system (RNS) datapath.
//
// The edge detector computes in the three-modulus RNS {2^n-1, 2^n, 2^n+1}.
// Every residue channel is one of three kinds, and each arithmetic module
// takes the kind as a parameter so that it can use the cheap structure that
// the modulus allows (end-around carry for 2^n-1, plain truncation for 2^n,
// subtract-and-correct for 2^n+1).  The moduli set and the values n = 4 and
// n = 6 follow the source design; the channel encoding is this design's own.
package rns_pkg;

  // Which modulus of the set a residue channel works in.
  typedef enum logic [1:0] {
    CH_LO  = 2'd0,  // 2^n - 1
    CH_MID = 2'd1,  // 2^n
    CH_HI  = 2'd2   // 2^n + 1
  } chan_kind_e;

  // Modulus of a channel kind for a given n.
  function automatic int unsigned modulus(int unsigned n, chan_kind_e kind);
    case (kind)
      CH_LO:   return (32'd1 << n) - 32'd1;
      CH_MID:  return (32'd1 << n);
      default: return (32'd1 << n) + 32'd1;
    endcase
  endfunction

  // Width of a residue of a channel kind: n bits, n+1 for 2^n+1.
  function automatic int unsigned res_width(int unsigned n, chan_kind_e kind);
    return (kind == CH_HI) ? n + 1 : n;
  endfunction

  // Dynamic range M = (2^n-1) * 2^n * (2^n+1) = 2^3n - 2^n.
  function automatic longint unsigned dyn_range(int unsigned n);
    return (64'd1 << (3 * n)) - (64'd1 << n);
  endfunction

  // Bits needed for a binary number in [0, M).
  function automatic int unsigned bin_width(int unsigned n);
    return 3 * n;
  endfunction

  // Constant residue of a (non-negative) integer, for elaboration-time use,
  // for example to turn kernel weights into residues.
  function automatic int unsigned const_residue(longint unsigned v, int unsigned n,
                                                chan_kind_e kind);
    return int'(v % longint'(modulus(n, kind)));
  endfunction

endpackage
