// dct_ref_pkg: reference model for the multiplier-free DCT testbenches.
//
// The reference is built from the definition of the DCT, not from the RTL's
// shift-add constants: the integer coefficient of row k, column n of an
// N-point transform is
//   C(k,n) = 64                                          for k = 0
//   C(k,n) = round(64 * sqrt(2) * cos((2n+1) k pi / 2N))  otherwise
// which gives 64/84/35 for N = 4 and 64/89/84/75/64/50/35/18 for N = 8.
// Each output is the plain dot product sum_n C(k,n) x(n) in 64-bit integers,
// so the reference has enough headroom for any sample width under test.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint coef(input int n_pts, input int k, input int n);
    real c;
    if (k == 0) return 64;
    c = 64.0 * $sqrt(2.0) * $cos(real'((2 * n + 1) * k) * PI / real'(2 * n_pts));
    return longint'($rtoi(c + ((c >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // y[k] of the N-point integer DCT of x[0..N-1] (N = 2, 4 or 8).
  function automatic longint dct_out(input int n_pts, input int k, input longint x [8]);
    longint acc;
    acc = 0;
    for (int n = 0; n < n_pts; n++) acc += coef(n_pts, k, n) * x[n];
    return acc;
  endfunction

  // A signed random sample of w bits; every fourth call returns a full-scale
  // value so the extreme corners of the word are hit often.
  function automatic longint rand_sample(input int w);
    longint lo, hi, r;
    lo = -(64'sd1 <<< (w - 1));
    hi = (64'sd1 <<< (w - 1)) - 1;
    case ($urandom_range(7))
      0: return lo;
      1: return hi;
      default: begin
        r = longint'({$urandom, $urandom});
        return lo + (r & ((64'sd1 <<< w) - 1));
      end
    endcase
  endfunction

endpackage
