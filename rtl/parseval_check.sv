// Parseval (sum-of-squares, SOS) check of one block transform.
//
// Two accumulators add up re^2 + im^2 of every sample of the input stream and
// of the output stream of a transform. Because the FFT core scales its result
// by 1/sqrt(N), the two sums are equal for a fault-free block up to rounding.
// When eval is pulsed after the last sample of a block, the check compares
// them: flag is set if |SOS_in - SOS_out| > TAU * 2^TAU_SHIFT (squared LSBs),
// flag_valid pulses for one cycle, and both accumulators are cleared for the
// next block; sos_in/sos_out show the running sums. Accumulators saturate at
// 2^ACC_W - 1.
//
// Timing: one sample per cycle on each side, accumulated at the clock edge
// where its valid is high; flag and flag_valid appear the cycle after eval.
// A sample arriving in the same cycle as eval is dropped.
//
// Following the document: sequential accumulation of both sides compared at
// the end of the block, 39-bit accumulators and a tolerance of 1. The document
// does not say in which unit the tolerance counts; here it counts units of
// 2^TAU_SHIFT squared LSBs, chosen above the rounding noise of the 1024-point
// transform (see the README). Clearing on eval is this design's own choice.
module parseval_check #(
  parameter int IN_W      = 14,
  parameter int OUT_W     = 16,
  parameter int ACC_W     = 39,
  parameter int TAU       = 1,
  parameter int TAU_SHIFT = 21
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic                    out_valid,
  input  logic signed [OUT_W-1:0] out_re,
  input  logic signed [OUT_W-1:0] out_im,
  input  logic                    eval,
  output logic                    flag,
  output logic                    flag_valid,
  output logic [ACC_W-1:0]        sos_in,
  output logic [ACC_W-1:0]        sos_out
);
  localparam logic [ACC_W:0] THRESH = (ACC_W+1)'(TAU) << TAU_SHIFT;

  // saturating a + b, where b fits in ACC_W bits
  function automatic logic [ACC_W-1:0] sat_add(logic [ACC_W-1:0] a, logic [ACC_W-1:0] b);
    logic [ACC_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[ACC_W] ? '1 : s[ACC_W-1:0];
  endfunction

  logic [ACC_W-1:0] sq_in, sq_out;
  always_comb begin
    logic signed [2*IN_W-1:0]  rr_in, ii_in;
    logic signed [2*OUT_W-1:0] rr_out, ii_out;
    rr_in  = (2*IN_W)'(in_re) * (2*IN_W)'(in_re);
    ii_in  = (2*IN_W)'(in_im) * (2*IN_W)'(in_im);
    rr_out = (2*OUT_W)'(out_re) * (2*OUT_W)'(out_re);
    ii_out = (2*OUT_W)'(out_im) * (2*OUT_W)'(out_im);
    sq_in  = ACC_W'(unsigned'(rr_in)) + ACC_W'(unsigned'(ii_in));
    sq_out = ACC_W'(unsigned'(rr_out)) + ACC_W'(unsigned'(ii_out));
  end

  logic [ACC_W:0] diff;
  assign diff = (sos_in >= sos_out) ? {1'b0, sos_in - sos_out} : {1'b0, sos_out - sos_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sos_in     <= '0;
      sos_out    <= '0;
      flag       <= 1'b0;
      flag_valid <= 1'b0;
    end else begin
      flag_valid <= eval;
      if (eval) begin
        flag    <= (diff > THRESH);
        sos_in  <= '0;
        sos_out <= '0;
      end else begin
        if (in_valid)  sos_in  <= sat_add(sos_in, sq_in);
        if (out_valid) sos_out <= sat_add(sos_out, sq_out);
      end
    end
  end
endmodule
