// Linear combination of parallel complex streams: the sum of the K inputs
// selected by MASK (bit i selects input i).
//
// The parity FFT takes the sum of all K inputs (x = x1 + x2 + ... + xK) and
// each Parseval check of the Hamming-coded arrangement takes the sum of the
// inputs of its group (x1 + x2 + x3 and so on), and the same sums of the FFT
// outputs; this module forms such a sum. The result is OUT_W bits wide; with
// OUT_W = IN_W + clog2(K) it cannot overflow. Purely combinational, no latency.
//
// The sums and their widths (12-bit inputs, 14-bit parity FFT input for four
// FFTs) follow the document; the module boundary is this design's own.
module comb_adder #(
  parameter int          K     = 4,
  parameter int          IN_W  = 12,
  parameter int          OUT_W = 14,
  parameter logic [31:0] MASK  = 32'hF
) (
  input  logic signed [IN_W-1:0]  in_re  [K],
  input  logic signed [IN_W-1:0]  in_im  [K],
  output logic signed [OUT_W-1:0] sum_re,
  output logic signed [OUT_W-1:0] sum_im
);
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int i = 0; i < K; i++) begin
      if (MASK[i]) begin
        sum_re = sum_re + OUT_W'(in_re[i]);
        sum_im = sum_im + OUT_W'(in_im[i]);
      end
    end
  end
endmodule
