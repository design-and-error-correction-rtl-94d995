// Error location and correction for K parallel FFTs protected by a parity FFT.
//
// The syndrome holds one bit per Parseval check (bit R-1 = check c1). FFT i is
// taken to be in error when the syndrome equals its column of the check
// matrix (fft_pkg::check_column): for one check per FFT that is "only check i
// failed", for the Hamming-coded checks it is the pattern of the table of
// error locations (111 -> FFT 1, 110 -> FFT 2, 101 -> FFT 3, 011 -> FFT 4 for
// four FFTs). The output of the FFT in error is rebuilt from the parity FFT
// output P and the other outputs, Xi = P - sum of Xj for j != i, computed as
// Xi + (P - sum of all Xj) and saturated to DW bits; every other output passes
// unchanged. So the block is a shared subtractor and one multiplexer per FFT.
//
// Status: err_loc = i + 1 for a corrected FFT i, 0 otherwise; check_error is a
// single failing check that names no FFT (the check itself was hit, the data
// pass unchanged); uncorrectable is any other non-zero syndrome (more than one
// error). Purely combinational.
//
// Following the document: the correction equations, the error-location table
// and the multiplexer structure. The handling of the patterns that name no
// FFT is this design's own.
module err_correct
  import fft_pkg::*;
#(
  parameter int      K      = 4,
  parameter scheme_e SCHEME = SCHEME_PARITY_SOS_ECC,
  parameter int      R      = num_checks(K, SCHEME),
  parameter int      DW     = 14,          // original FFT output width
  parameter int      PW     = 16,          // parity FFT output width
  parameter int      LW     = $clog2(K + 1)
) (
  input  logic [R-1:0]           syndrome,
  input  logic signed [DW-1:0]   x_re [K],
  input  logic signed [DW-1:0]   x_im [K],
  input  logic signed [PW-1:0]   p_re,
  input  logic signed [PW-1:0]   p_im,
  output logic signed [DW-1:0]   y_re [K],
  output logic signed [DW-1:0]   y_im [K],
  output logic [LW-1:0]          err_loc,
  output logic                   check_error,
  output logic                   uncorrectable
);
  localparam int SW = PW + $clog2(K) + 2;   // width of the difference terms

  function automatic logic signed [DW-1:0] sat(logic signed [SW-1:0] v);
    localparam logic signed [SW-1:0] MAXV = (SW'(1) <<< (DW - 1)) - SW'(1);
    localparam logic signed [SW-1:0] MINV = -(SW'(1) <<< (DW - 1));
    if (v > MAXV) return MAXV[DW-1:0];
    if (v < MINV) return MINV[DW-1:0];
    return v[DW-1:0];
  endfunction

  logic [K-1:0] hit;
  logic signed [SW-1:0] d_re, d_im;

  always_comb begin
    logic signed [SW-1:0] s_re, s_im;
    s_re = '0;
    s_im = '0;
    for (int i = 0; i < K; i++) begin
      s_re = s_re + SW'(x_re[i]);
      s_im = s_im + SW'(x_im[i]);
    end
    d_re = SW'(p_re) - s_re;
    d_im = SW'(p_im) - s_im;
  end

  always_comb begin
    err_loc = '0;
    for (int i = 0; i < K; i++) begin
      hit[i] = (32'(syndrome) == check_column(i, R, SCHEME));
      if (hit[i]) err_loc = LW'(i + 1);
      y_re[i] = hit[i] ? sat(SW'(x_re[i]) + d_re) : x_re[i];
      y_im[i] = hit[i] ? sat(SW'(x_im[i]) + d_im) : x_im[i];
    end
    check_error   = (hit == '0) && (popcount32(32'(syndrome)) == 1);
    uncorrectable = (hit == '0) && (popcount32(32'(syndrome)) > 1);
  end
endmodule
