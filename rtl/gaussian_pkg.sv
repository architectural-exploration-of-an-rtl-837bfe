// gaussian_pkg: types and elaboration-time constants shared by the Gaussian
// filter accelerator.
//
// Coefficients. The kernel is the 2-D Gaussian of standard deviation 1,
// sampled on an N x N grid centred on the window, normalised so that the
// samples sum to one and quantised to F fractional bits (unsigned Q0.F).
// Each weight is rounded to the nearest integer multiple of 2^-F; the centre
// weight then takes whatever is needed for the quantised weights to sum to
// exactly 2^F, so a flat image passes through unchanged and no sum can exceed
// the pixel range. The 1-D kernel used by the separable architecture is built
// the same way from the 1-D Gaussian. sigma = 1 and the 3/5/7 window sizes
// are the evaluated configurations; the rounding and the residual rule are
// this implementation's choice.
//
// Coefficient classes. The Modified architecture groups window positions
// that share a coefficient. With a radially symmetric kernel, positions
// (i,j) with the same unordered pair {|i-R|, |j-R|} (R = N/2) share a
// weight. A class index is hi*(hi+1)/2 + lo with lo <= hi.
package gaussian_pkg;

  localparam int unsigned PIX_W = 8;  // grey-scale input/output pixels

  // The four convolution-operator architectures.
  typedef enum logic [1:0] {
    ARCH_2D       = 2'd0,  // one multiplier per coefficient + adder tree
    ARCH_MODIFIED = 2'd1,  // pre-add positions sharing a coefficient
    ARCH_SEPARATE = 2'd2,  // horizontal 1xN then vertical Nx1
    ARCH_LUT      = 2'd3   // multipliers replaced by constant ROMs
  } arch_e;

  // Integer bits of the fixed-point data word that each architecture needs
  // to avoid overflow: 8 for 2-D and LUT, 9 for Separate, 10 (3x3) or 11
  // (5x5, 7x7) for Modified.
  function automatic int unsigned default_int_w(arch_e arch, int unsigned n);
    case (arch)
      ARCH_MODIFIED: return (n <= 3) ? 10 : 11;
      ARCH_SEPARATE: return 9;
      default:       return 8;
    endcase
  endfunction

  function automatic int unsigned iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Unnormalised Gaussian sample, sigma = 1.
  function automatic real gauss2(int di, int dj);
    return $exp(-real'(di * di + dj * dj) / 2.0);
  endfunction

  function automatic int unsigned round_q(real x, int unsigned f);
    return $rtoi(x * real'(1 << f) + 0.5);
  endfunction

  // 2-D weight of window position (i,j), 0 <= i,j < n, in Q0.f.
  function automatic int unsigned coef2d(int unsigned n, int unsigned f,
                                         int unsigned i, int unsigned j);
    int r;
    real s;
    int unsigned acc;
    r = int'(n / 2);
    s = 0.0;
    for (int a = -r; a <= r; a++)
      for (int b = -r; b <= r; b++) s += gauss2(a, b);
    if (i != n / 2 || j != n / 2)
      return round_q(gauss2(int'(i) - r, int'(j) - r) / s, f);
    acc = 0;
    for (int a = -r; a <= r; a++)
      for (int b = -r; b <= r; b++)
        if (a != 0 || b != 0) acc += round_q(gauss2(a, b) / s, f);
    return (1 << f) - acc;
  endfunction

  // 1-D weight of tap k, 0 <= k < n, in Q0.f.
  function automatic int unsigned coef1d(int unsigned n, int unsigned f, int unsigned k);
    int r;
    real s;
    int unsigned acc;
    r = int'(n / 2);
    s = 0.0;
    for (int a = -r; a <= r; a++) s += gauss2(a, 0);
    if (k != n / 2) return round_q(gauss2(int'(k) - r, 0) / s, f);
    acc = 0;
    for (int a = -r; a <= r; a++)
      if (a != 0) acc += round_q(gauss2(a, 0) / s, f);
    return (1 << f) - acc;
  endfunction

  // Coefficient classes of the Modified architecture.
  function automatic int unsigned num_classes(int unsigned n);
    return (n / 2 + 1) * (n / 2 + 2) / 2;
  endfunction

  function automatic int unsigned class_of(int unsigned n, int unsigned i, int unsigned j);
    int unsigned a, b, lo, hi;
    a  = iabs(int'(i) - int'(n / 2));
    b  = iabs(int'(j) - int'(n / 2));
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    return hi * (hi + 1) / 2 + lo;
  endfunction

  function automatic int unsigned class_size(int unsigned n, int unsigned c);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = 0; j < n; j++)
        if (class_of(n, i, j) == c) cnt++;
    return cnt;
  endfunction

  // Flat index i*n+j of the k-th member (row-major order) of class c.
  function automatic int unsigned class_member(int unsigned n, int unsigned c, int unsigned k);
    int unsigned cnt;
    cnt = 0;
    for (int unsigned i = 0; i < n; i++)
      for (int unsigned j = 0; j < n; j++)
        if (class_of(n, i, j) == c) begin
          if (cnt == k) return i * n + j;
          cnt++;
        end
    return 0;
  endfunction

  function automatic int unsigned max_class_size(int unsigned n);
    int unsigned m;
    m = 0;
    for (int unsigned c = 0; c < num_classes(n); c++)
      if (class_size(n, c) > m) m = class_size(n, c);
    return m;
  endfunction

  // Number of two-input adder levels needed to sum m values.
  function automatic int unsigned tree_levels(int unsigned m);
    return (m > 1) ? $clog2(m) : 0;
  endfunction

endpackage
