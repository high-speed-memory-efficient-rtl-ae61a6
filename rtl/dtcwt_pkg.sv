// dtcwt_pkg: constants and helpers shared by the 3D DTCWT filter banks.
//
// The dual-tree filter bank uses four 10-tap filters: H0a/H1a (tree a,
// low/high pass) and H0b/H1b (tree b). Their coefficients are the first-level
// Kingsbury 10-tap values 0, +-0.0112, +-0.0884, +-0.6959, held here as
// integers scaled by 256 (3, 23, 178), so every filter output carries a gain of
// 256. The tree-b filters are related to the tree-a low pass by
//   H0b[k] = H0a[9-k],  H1a[k] = (-1)^k H0b[k],  H1b[k] = (-1)^(k+1) H0a[k],
// which the systolic array exploits (one product feeds two filters).
//
// Which table column is which filter, the 10-bit data width and the
// requantisation between stages (arithmetic shift by 8, saturate) are this
// design's choices; the integer coefficients are those of the document.
package dtcwt_pkg;

  // data width of every filter input (the input registers are 10 bits)
  localparam int unsigned DW = 10;
  // coefficient scale: coefficients are real value * 2^CSHIFT
  localparam int unsigned CSHIFT = 8;
  // width of a full-precision filter output: 10-bit data * sum|c| (<= 454)
  localparam int unsigned YW = DW + 10;
  localparam int unsigned NTAP = 10;

  typedef enum logic [1:0] {
    F_H0A = 2'd0,
    F_H1A = 2'd1,
    F_H0B = 2'd2,
    F_H1B = 2'd3
  } filt_e;

  // filter-bank architectures proposed by the document
  typedef enum logic [2:0] {
    ARCH_RMDA1 = 3'd0,  // reduced modular DA 1  (Fig. 3)
    ARCH_RMDA2 = 3'd1,  // reduced modular DA 2  (Fig. 4)
    ARCH_OMDA1 = 3'd2,  // optimised modular DA 1 (Fig. 5)
    ARCH_OMDA2 = 3'd3,  // optimised modular DA 2 (Fig. 6)
    ARCH_SA    = 3'd4,  // systolic PE array (Figs. 7-9)
    ARCH_RMSA  = 3'd5,  // reduced modular SA, LVT form (Fig. 10)
    ARCH_ORMSA = 3'd6   // optimised reduced modular SA (Fig. 11)
  } arch_e;

  typedef logic signed [DW-1:0] samp_t;
  typedef logic signed [YW-1:0] fout_t;

  // coefficient k of filter f, scaled by 256
  function automatic int coef(input int f, input int k);
    int c0a [NTAP] = '{0, -23,  23, 178,  178,   23, -23,   3,   3, 0};
    int c1a [NTAP] = '{0,  -3,   3,  23,   23, -178, 178, -23, -23, 0};
    int c0b [NTAP] = '{0,   3,   3, -23,   23,  178, 178,  23, -23, 0};
    int c1b [NTAP] = '{0, -23, -23, 178, -178,   23,  23,   3,  -3, 0};
    case (f)
      0:       return c0a[k];
      1:       return c1a[k];
      2:       return c0b[k];
      default: return c1b[k];
    endcase
  endfunction

  // Optimised form: the filters use only the magnitudes 0, 3, 23, 178. With
  // the magnitude groups g1 (3), g2 (23), g3 (178) the output is
  //   3*g1 + 23*g2 + 178*g3 = 3*(g1+g2+g3) + 20*(g2+g3) + 155*g3
  // so the LUT holds sums of the increments 0, 3, 20, 155.
  function automatic int opt_coef(input int lane);
    case (lane)
      0:       return 0;
      1:       return 3;
      2:       return 20;
      default: return 155;
    endcase
  endfunction

  // magnitude group (0..3) of coefficient k of filter f
  function automatic int mag_group(input int f, input int k);
    int c = coef(f, k);
    if (c < 0) c = -c;
    case (c)
      0:       return 0;
      3:       return 1;
      23:      return 2;
      default: return 3;
    endcase
  endfunction

  // full-precision output -> next-stage sample: drop the 2^8 coefficient
  // scale and saturate to DW bits
  function automatic samp_t requant(input fout_t y);
    fout_t s;
    s = y >>> CSHIFT;
    if (s > fout_t'(2 ** (DW - 1) - 1)) return samp_t'(2 ** (DW - 1) - 1);
    if (s < -fout_t'(2 ** (DW - 1))) return samp_t'(-(2 ** (DW - 1)));
    return samp_t'(s);
  endfunction

  // 1 when requant() clips
  function automatic logic requant_clips(input fout_t y);
    fout_t s;
    s = y >>> CSHIFT;
    return (s > fout_t'(2 ** (DW - 1) - 1)) || (s < -fout_t'(2 ** (DW - 1)));
  endfunction

endpackage
