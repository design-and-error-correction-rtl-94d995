// Shared types and elaboration-time helpers for the protected parallel FFT.
//
// scheme_e selects how the Parseval (sum-of-squares) checks are arranged:
//   SCHEME_PARITY_SOS      one check per FFT; FFT i is flagged by check i alone.
//   SCHEME_PARITY_SOS_ECC  the checks are the parity checks of a single-error-
//                          correcting Hamming code over the K FFTs; each check
//                          covers a group of FFTs and the pattern of failing
//                          checks (the syndrome) names the FFT in error.
// Both schemes correct with one parity FFT whose input is the sum of all K
// inputs.
//
// Syndrome bit order: bit R-1 is check c1, bit 0 is check cR. For the Hamming
// arrangement the column of FFT i (0-based) is the i-th R-bit value of weight
// two or more, counted downwards from all ones. For R = 3 this gives
// 111, 110, 101, 011 for the four FFTs, and leaves 100, 010, 001 to single
// check errors, the code of the document's table of error locations.
package fft_pkg;

  typedef enum logic [0:0] {
    SCHEME_PARITY_SOS     = 1'b0,
    SCHEME_PARITY_SOS_ECC = 1'b1
  } scheme_e;

  function automatic int popcount32(int unsigned v);
    int n = 0;
    for (int b = 0; b < 32; b++) n += int'(v[b]);
    return n;
  endfunction

  // Number of Parseval checks needed for k FFTs.
  function automatic int num_checks(int k, scheme_e s);
    int r = 2;
    if (s == SCHEME_PARITY_SOS) return k;
    while (((1 << r) - r - 1) < k) r++;
    return r;
  endfunction

  // Check mask (syndrome column) of FFT i, r checks.
  function automatic int unsigned check_column(int i, int r, scheme_e s);
    int n = 0;
    if (s == SCHEME_PARITY_SOS) return 32'd1 << (r - 1 - i);
    for (int v = (1 << r) - 1; v > 0; v--) begin
      if (popcount32(v) >= 2) begin
        if (n == i) return v;
        n++;
      end
    end
    return 0;
  endfunction

  // Bit mask of the FFTs covered by check c (0 = c1), k FFTs, r checks.
  function automatic int unsigned check_group(int c, int k, int r, scheme_e s);
    int unsigned g = 0;
    int unsigned col;
    for (int i = 0; i < k; i++) begin
      col = check_column(i, r, s);
      if (col[r - 1 - c]) g |= 32'd1 << i;
    end
    return g;
  endfunction

  function automatic int clog2i(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
