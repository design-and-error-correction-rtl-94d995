// Test sequence for one pfft_system configuration, used by tb_pfft_sizes.
//
// Runs 64-point blocks through a pfft_system with K FFTs: one clean block,
// then one block per FFT with a large soft error in that FFT. The syndrome
// must equal the column expected for that FFT (EXP_COL, written out by the
// caller from the Hamming code, independently of the design's own table),
// the FFT must be named, and every output must match a floating-point DFT.
// done rises when the sequence has finished; checks and failures count.
module pfft_sizes_unit
  import fft_pkg::*;
#(
  parameter int          K       = 8,
  parameter scheme_e     SCHEME  = SCHEME_PARITY_SOS_ECC,
  parameter int          R       = 4,
  parameter logic [15:0] EXP_COL [K] = '{default: 16'h0}
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int IN_W = 12, OUT_W = 14, M = 3, NP = 64;
  localparam int POUT_W = OUT_W + clog2i(K);

  logic in_valid, in_ready, status_valid, check_error, uncorrectable, tmr_mismatch;
  logic out_valid, out_last;
  logic [9:0] out_idx;
  logic signed [IN_W-1:0] x_re [K], x_im [K];
  logic signed [OUT_W-1:0] y_re [K], y_im [K];
  logic [R-1:0] syndrome;
  logic [$clog2(K+1)-1:0] err_loc;
  logic [K:0] fi_fft;
  logic [R-1:0] fi_check;
  logic [POUT_W-1:0] fi_mask_re, fi_mask_im;

  pfft_system #(.K(K), .SCHEME(SCHEME)) dut (
    .clk, .rst_n, .cfg_stages(3'(M)), .in_valid, .in_ready, .x_re, .x_im,
    .status_valid, .syndrome, .err_loc, .check_error, .uncorrectable, .tmr_mismatch,
    .out_valid, .out_last, .out_idx, .y_re, .y_im,
    .fi_fft, .fi_coef(1'b0), .fi_stage(3'd2), .fi_addr(10'd9), .fi_mask_re, .fi_mask_im, .fi_check);

  int xr [K][NP], xi [K][NP], yr [K][NP], yi [K][NP];
  logic [R-1:0] got_syn;
  int got_loc;

  task automatic run_block();
    int k = 0;
    for (int f = 0; f < K; f++)
      for (int i = 0; i < NP; i++) begin
        xr[f][i] = $signed($urandom_range(2000)) - 1000;
        xi[f][i] = $signed($urandom_range(2000)) - 1000;
      end
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      in_valid = 1;
      for (int f = 0; f < K; f++) begin x_re[f] = IN_W'(xr[f][i]); x_im[f] = IN_W'(xi[f][i]); end
      @(negedge clk);
    end
    in_valid = 0;
    while (!status_valid) @(negedge clk);
    got_syn = syndrome;
    while (k < NP) begin
      @(negedge clk);
      if (out_valid) begin
        for (int f = 0; f < K; f++) begin yr[f][k] = y_re[f]; yi[f][k] = y_im[f]; end
        got_loc = err_loc;
        k++;
      end
    end
  endtask

  task automatic check_outputs(input int tol);
    real pi2 = 2.0 * 3.14159265358979323846;
    int bad = 0;
    for (int f = 0; f < K; f++)
      for (int k = 0; k < NP; k++) begin
        real sr = 0.0, si = 0.0;
        int er, ei;
        for (int n = 0; n < NP; n++) begin
          real a = pi2 * real'((n * k) % NP) / real'(NP);
          sr += real'(xr[f][n]) * $cos(a) + real'(xi[f][n]) * $sin(a);
          si += real'(xi[f][n]) * $cos(a) - real'(xr[f][n]) * $sin(a);
        end
        er = yr[f][k] - $rtoi($floor(sr / 8.0 + 0.5));
        ei = yi[f][k] - $rtoi($floor(si / 8.0 + 0.5));
        if (er > tol || er < -tol || ei > tol || ei < -tol) bad++;
      end
    checks++;
    if (bad != 0) begin failures++; $display("K=%0d: %0d output values off", K, bad); end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    in_valid = 0; fi_fft = '0; fi_check = '0;
    fi_mask_re = POUT_W'(16'h2000); fi_mask_im = POUT_W'(16'h2000);
    for (int f = 0; f < K; f++) begin x_re[f] = 0; x_im[f] = 0; end
    @(posedge rst_n);
    run_block();
    checks++;
    if (got_syn != 0) begin failures++; $display("K=%0d clean block: syndrome %b", K, got_syn); end
    check_outputs(4);
    for (int f = 0; f < K; f++) begin
      fi_fft = '0;
      fi_fft[f] = 1'b1;
      run_block();
      fi_fft = '0;
      checks++;
      if (32'(got_syn) != 32'(EXP_COL[f]) || got_loc != f + 1) begin
        failures++;
        $display("K=%0d error in FFT %0d: syndrome %b loc %0d, expected %b", K, f + 1, got_syn, got_loc, EXP_COL[f][R-1:0]);
      end
      check_outputs(4 + 2 * K);
    end
    done = 1;
  end
endmodule
