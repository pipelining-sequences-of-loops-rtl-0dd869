// tb_dct_ref: reference model of the 8-point DCT used by the testbenches.
//
// Independent of the RTL: coefficients are computed here from $cos and
// rounded, then F0/F4 are signed sums (no multiply, no shift) and the other
// outputs are the 13-bit-fraction sums of products shifted right
// arithmetically by 13; all results are truncated to 16 bits (C short).
// dct_2d applies it to the columns of one 8x8 block (column pass) and then
// to the rows of the result (row pass).
package tb_dct_ref;

  function automatic int q13(input int k, input int n);
    real c;
    c = 8192.0 * $cos(real'((2 * n + 1) * k) * 3.14159265358979323846 / 16.0);
    return int'($floor(c + 0.5));
  endfunction

  function automatic shortint dct_point(input shortint x[8], input int k);
    longint acc;
    acc = 0;
    for (int n = 0; n < 8; n++) begin
      if (k == 0 || k == 4) acc += (q13(k, n) < 0) ? -longint'(x[n]) : longint'(x[n]);
      else                  acc += longint'(x[n]) * longint'(q13(k, n));
    end
    if (k == 0 || k == 4) return shortint'(acc);
    return shortint'(acc >>> 13);
  endfunction

  // Column pass then row pass of one block (64 elements, row-major).
  function automatic void dct_2d(input shortint img[64], output shortint tmp[64],
                                 output shortint res[64]);
    shortint x[8];
    for (int j = 0; j < 8; j++) begin
      for (int n = 0; n < 8; n++) x[n] = img[8 * n + j];
      for (int k = 0; k < 8; k++) tmp[8 * k + j] = dct_point(x, k);
    end
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) x[n] = tmp[8 * r + n];
      for (int k = 0; k < 8; k++) res[8 * r + k] = dct_point(x, k);
    end
  endfunction

endpackage
