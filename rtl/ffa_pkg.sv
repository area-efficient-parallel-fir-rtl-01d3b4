// ffa_pkg: shared types and constants of the parallel symmetric FIR filters.
//
// The filters split an N-tap filter into polyphase sub-filters that each run
// at the block rate (one block of L samples per clock). A sub-filter whose
// coefficients are symmetric or antisymmetric needs only one multiplier per
// coefficient pair; sub_kind_e tells a sub-filter which case it is.
// Data and coefficient widths are not fixed by the filter structure; the
// 16-bit defaults here are a choice of this design.
package ffa_pkg;

  // Coefficient symmetry of one sub-filter of length M:
  //   SUB_GENERAL       g[k] arbitrary                 -> M multipliers
  //   SUB_SYMMETRIC     g[k] =  g[M-1-k]               -> ceil(M/2) multipliers
  //   SUB_ANTISYMMETRIC g[k] = -g[M-1-k]               -> floor(M/2) multipliers
  typedef enum logic [1:0] {
    SUB_GENERAL       = 2'd0,
    SUB_SYMMETRIC     = 2'd1,
    SUB_ANTISYMMETRIC = 2'd2
  } sub_kind_e;

  // Default sample and coefficient widths (two's complement).
  localparam int unsigned DEF_DATA_W = 16;
  localparam int unsigned DEF_COEF_W = 16;

  // Number of coefficients a sub-filter of length m and kind k takes.
  function automatic int unsigned sub_ncoef(int unsigned m, sub_kind_e k);
    return (k == SUB_GENERAL) ? m : (m + 1) / 2;
  endfunction

  // Number of multipliers a sub-filter of length m and kind k uses.
  function automatic int unsigned sub_nmult(int unsigned m, sub_kind_e k);
    case (k)
      SUB_SYMMETRIC:     return (m + 1) / 2;
      SUB_ANTISYMMETRIC: return m / 2;
      default:           return m;
    endcase
  endfunction

  // Multipliers of a 2x2 stage (ffa2_core) for a p-tap filter of kind k:
  // sub-filters G0+G1, G0-G1 and G1 of p/2 taps each.
  function automatic int unsigned ffa2_nmult(int unsigned p, sub_kind_e k);
    sub_kind_e ks, kd;
    ks = (k == SUB_GENERAL) ? SUB_GENERAL : k;
    kd = (k == SUB_SYMMETRIC) ? SUB_ANTISYMMETRIC :
         (k == SUB_ANTISYMMETRIC) ? SUB_SYMMETRIC : SUB_GENERAL;
    return sub_nmult(p / 2, ks) + sub_nmult(p / 2, kd) + p / 2;
  endfunction

  // Width of an exact N-tap result of DW-bit samples and CW-bit coefficients.
  function automatic int unsigned out_width(int unsigned dw, int unsigned cw, int unsigned n);
    return dw + cw + $clog2(n);
  endfunction

endpackage
