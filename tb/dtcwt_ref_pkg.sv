// dtcwt_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL datapaths: plain multiply-accumulate FIR on the
// document's integer coefficients, requantisation (divide by 256 rounding
// towards minus infinity, clamp to [-512, 511]) and the sum/difference
// formulas of the 2D and 3D stages.
package dtcwt_ref_pkg;

  function automatic int rcoef(input int f, input int k);
    int t [4][10] = '{
      '{0, -23,  23, 178,  178,   23, -23,   3,   3, 0},
      '{0,  -3,   3,  23,   23, -178, 178, -23, -23, 0},
      '{0,   3,   3, -23,   23,  178, 178,  23, -23, 0},
      '{0, -23, -23, 178, -178,   23,  23,   3,  -3, 0}};
    return t[f][k];
  endfunction

  function automatic longint rfir(input int f, input int w [10]);
    longint s = 0;
    for (int k = 0; k < 10; k++) s += longint'(rcoef(f, k)) * longint'(w[k]);
    return s;
  endfunction

  function automatic int rreq(input longint y);
    longint q;
    q = y / 256;
    if (y < 0 && (y % 256) != 0) q = q - 1;   // floor division
    if (q > 511) q = 511;
    if (q < -512) q = -512;
    return int'(q);
  endfunction

  function automatic bit rclips(input longint y);
    longint q;
    q = y / 256;
    if (y < 0 && (y % 256) != 0) q = q - 1;
    return (q > 511) || (q < -512);
  endfunction

  // 2D: r, t1, t2, u -> re_a, re_b, im_a, im_b
  function automatic longint rsd2(input int j, input longint r, input longint t1,
                                  input longint t2, input longint u);
    case (j)
      0:       return r - u;
      1:       return r + u;
      2:       return t1 + t2;
      default: return t2 - t1;
    endcase
  endfunction

  // 3D: aaa, bba, bab, abb -> four real subbands
  function automatic longint rsd3(input int j, input longint aaa, input longint bba,
                                  input longint bab, input longint abb);
    case (j)
      0:       return aaa - bba - bab - abb;
      1:       return aaa + bba + bab - abb;
      2:       return aaa + bba - bab + abb;
      default: return aaa - bba + bab + abb;
    endcase
  endfunction

endpackage
