// gauss_ref_pkg: reference model used by the testbenches.
//
// Computes the expected coefficients and filtered pixels with plain integer
// arithmetic on whole images, written independently of the RTL's structure:
//   weights: Gaussian of sigma 1 sampled on the window, normalised to sum 1,
//            rounded to F fractional bits, centre weight = 2^F minus the rest;
//   2-D, Modified, LUT: out = min(255, floor(sum p*w / 2^F));
//   Separate: h = sum over a row of p*w1 (exact), v = sum over a column of
//            floor(h*w1 / 2^F), out = min(255, floor(v / 2^F)).
// Only windows wholly inside the image produce output.
package gauss_ref_pkg;

  function automatic int ref_w2(int n, int f, int i, int j);
    real g [int];
    real tot;
    int  r, s, q;
    r = n / 2;
    tot = 0.0;
    for (int a = 0; a < n; a++)
      for (int b = 0; b < n; b++) begin
        g[a*n+b] = $exp(-0.5 * real'((a - r) * (a - r) + (b - r) * (b - r)));
        tot += g[a*n+b];
      end
    if (i != r || j != r) return int'($floor(g[i*n+j] / tot * (2.0 ** f) + 0.5));
    s = 0;
    for (int a = 0; a < n; a++)
      for (int b = 0; b < n; b++)
        if (a != r || b != r) begin
          q = int'($floor(g[a*n+b] / tot * (2.0 ** f) + 0.5));
          s += q;
        end
    return (1 << f) - s;
  endfunction

  function automatic int ref_w1(int n, int f, int k);
    real tot;
    int  r, s;
    r = n / 2;
    tot = 0.0;
    for (int a = 0; a < n; a++) tot += $exp(-0.5 * real'((a - r) * (a - r)));
    if (k != r) return int'($floor($exp(-0.5 * real'((k - r) * (k - r))) / tot * (2.0 ** f) + 0.5));
    s = 0;
    for (int a = 0; a < n; a++)
      if (a != r) s += int'($floor($exp(-0.5 * real'((a - r) * (a - r))) / tot * (2.0 ** f) + 0.5));
    return (1 << f) - s;
  endfunction

  function automatic int sat_pixel(longint v, int f);
    longint p;
    p = v >>> f;
    return (p > 255) ? 255 : int'(p);
  endfunction

  // Output pixel at output position (r, c) (window top-left at image (r, c))
  // of the 2-D / Modified / LUT filters. img is row-major, w wide; wt holds
  // the n*n weights row-major (from ref_w2).
  function automatic int ref_pixel_2d(ref byte unsigned img[], ref int wt[], input int w,
                                      input int n, input int f, input int r, input int c);
    longint acc;
    acc = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        acc += longint'(img[(r + i) * w + c + j]) * wt[i*n+j];
    return sat_pixel(acc, f);
  endfunction

  // Output pixel of the Separate filter, intermediate words of dw bits; w1
  // holds the n 1-D weights (from ref_w1).
  function automatic int ref_pixel_sep(ref byte unsigned img[], ref int w1[], input int w,
                                       input int n, input int f, input int dw,
                                       input int r, input int c);
    longint acc, h, mask;
    mask = (longint'(1) << dw) - 1;
    acc = 0;
    for (int i = 0; i < n; i++) begin
      h = 0;
      for (int k = 0; k < n; k++) h += longint'(img[(r + i) * w + c + k]) * w1[k];
      h &= mask;
      acc += (h * w1[i]) >>> f;
    end
    return sat_pixel(acc & mask, f);
  endfunction

endpackage
