// conv_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL (plain integer multiplies and powers).
package conv_ref_pkg;
  // value of a 4-bit log code: 0 -> 0, c -> 2^(c-1)
  function automatic longint log_val(input int c);
    return (c == 0) ? 0 : (longint'(1) << (c - 1));
  endfunction

  // signed value of a log coefficient {sign, code}
  function automatic longint log_coef_val(input int c);
    longint m = log_val(c & 15);
    return ((c >> 4) & 1) ? -m : m;
  endfunction

  function automatic int clamp255(input longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : int'(v);
  endfunction

  // 0..255 -> log code, rounding at the half-way bit below the leading one
  function automatic int lin2log(input int v);
    int e;
    if (v <= 0) return 0;
    e = 0;
    while ((1 << (e + 1)) <= v) e++;
    if (e == 0) return 1;
    return e + 1 + ((v >> (e - 1)) & 1);
  endfunction

  // arithmetic shift right of a signed sum
  function automatic longint asr(input longint v, input int s);
    return v >>> s;
  endfunction

  // linear result pixel for a window w[9] (row-major) and kernel k[9]
  function automatic int ref_lin(input int w[9], input int k[9], input int shift);
    longint s = 0;
    for (int i = 0; i < 9; i++) s += longint'(w[i]) * longint'(k[i]);
    return clamp255(asr(s, shift));
  endfunction

  // log result code for a window of codes and log coefficients
  function automatic int ref_log(input int w[9], input int k[9], input int shift);
    longint s = 0;
    for (int i = 0; i < 9; i++) s += log_val(w[i]) * log_coef_val(k[i]);
    return lin2log(clamp255(asr(s, shift)));
  endfunction

  // 8-bit signed coefficient stored in a byte
  function automatic int sx8(input int b);
    return (b > 127) ? b - 256 : b;
  endfunction

  // whole-image reference: valid 3x3 convolution of img (row-major, h x w),
  // results in raster order; log selects the log-domain arithmetic
  function automatic void ref_image(input int img[], input int w, input int h, input int k[9],
                                    input int shift, input bit log, ref int res[$]);
    int win[9];
    res.delete();
    for (int r = 0; r + 2 < h; r++)
      for (int c = 0; c + 2 < w; c++) begin
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) win[3*i+j] = img[(r+i)*w + c + j];
        res.push_back(log ? ref_log(win, k, shift) : ref_lin(win, k, shift));
      end
  endfunction
endpackage
