// Self-checking testbench for pfft_system, run for both protection schemes at
// once: dut_e (parity-SOS-ECC, three Hamming-coded checks) and dut_s
// (parity-SOS, one check per FFT), fed the same four random input streams.
//
// Every block's outputs are compared with a floating-point DFT of each input
// scaled by 1/sqrt(N'), so a wrong correction shows as a wrong spectrum. The
// scenarios: a clean block; a large soft error in each of the four FFTs in
// turn (the syndrome must match the error-location table, the FFT must be
// named and its output rebuilt); an upset in a rotation coefficient of FFT 2
// (corrected the same way); an error in the parity FFT (no effect); a
// hit on one check (ECC: reported as a check error and nothing corrected;
// SOS: an unneeded correction that still gives the right result); two FFTs
// in error (SOS: uncorrectable); and a full 1024-point block with an error,
// whose verdict must come exactly 5*1024 + 9 cycles after the last input.
module tb_pfft_system;
  import fft_pkg::*;
  localparam int K = 4, LOG4N = 5, IN_W = 12, OUT_W = 14, N = 4 ** LOG4N;
  localparam int RE = 3, RS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_stages;
  logic in_valid;
  logic signed [IN_W-1:0] x_re [K], x_im [K];
  logic [2:0] fi_stage;
  logic [2*LOG4N-1:0] fi_addr;
  logic [15:0] fi_mask_re, fi_mask_im;
  logic [K:0] fi_fft_e, fi_fft_s;
  logic fi_coef;
  logic [RE-1:0] fi_check_e;
  logic [RS-1:0] fi_check_s;

  logic rdy_e, sv_e, ce_e, un_e, mm_e, ov_e, ol_e;
  logic rdy_s, sv_s, ce_s, un_s, mm_s, ov_s, ol_s;
  logic [RE-1:0] syn_e;
  logic [RS-1:0] syn_s;
  logic [2:0] loc_e, loc_s;
  logic [2*LOG4N-1:0] oi_e, oi_s;
  logic signed [OUT_W-1:0] ye_re [K], ye_im [K], ys_re [K], ys_im [K];

  pfft_system #(.K(K), .SCHEME(SCHEME_PARITY_SOS_ECC)) dut_e (
    .clk, .rst_n, .cfg_stages, .in_valid, .in_ready(rdy_e), .x_re, .x_im,
    .status_valid(sv_e), .syndrome(syn_e), .err_loc(loc_e), .check_error(ce_e),
    .uncorrectable(un_e), .tmr_mismatch(mm_e),
    .out_valid(ov_e), .out_last(ol_e), .out_idx(oi_e), .y_re(ye_re), .y_im(ye_im),
    .fi_fft(fi_fft_e), .fi_coef, .fi_stage, .fi_addr, .fi_mask_re, .fi_mask_im, .fi_check(fi_check_e));

  pfft_system #(.K(K), .SCHEME(SCHEME_PARITY_SOS)) dut_s (
    .clk, .rst_n, .cfg_stages, .in_valid, .in_ready(rdy_s), .x_re, .x_im,
    .status_valid(sv_s), .syndrome(syn_s), .err_loc(loc_s), .check_error(ce_s),
    .uncorrectable(un_s), .tmr_mismatch(mm_s),
    .out_valid(ov_s), .out_last(ol_s), .out_idx(oi_s), .y_re(ys_re), .y_im(ys_im),
    .fi_fft(fi_fft_s), .fi_coef, .fi_stage, .fi_addr, .fi_mask_re, .fi_mask_im, .fi_check(fi_check_s));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [K][N], xi [K][N];
  int oer [K][N], oei [K][N], osr [K][N], osi [K][N];
  logic [RE-1:0] got_syn_e;
  logic [RS-1:0] got_syn_s;
  int got_loc_e, got_loc_s;
  bit got_ce_e, got_ce_s, got_un_e, got_un_s;
  longint t_last_in, t_status;

  task automatic run_block(input int m);
    int np = 4 ** m;
    int k = 0;
    for (int f = 0; f < K; f++)
      for (int i = 0; i < np; i++) begin
        xr[f][i] = $signed($urandom_range(3000)) - 1500;
        xi[f][i] = $signed($urandom_range(3000)) - 1500;
      end
    cfg_stages = 3'(m);
    @(negedge clk);
    for (int i = 0; i < np; i++) begin
      in_valid = 1;
      for (int f = 0; f < K; f++) begin x_re[f] = IN_W'(xr[f][i]); x_im[f] = IN_W'(xi[f][i]); end
      @(posedge clk);
      if (!rdy_e || !rdy_s) begin failures++; $display("inputs not accepted"); end
      if (i == np - 1) t_last_in = cycle;
      #1;
    end
    in_valid = 0;
    while (1) begin
      @(posedge clk);
      if (sv_e) begin
        t_status = cycle;
        #1;
        got_syn_e = syn_e; got_syn_s = syn_s;
        break;
      end
    end
    while (k < np) begin
      @(posedge clk);
      if (ov_e != ov_s) begin failures++; $display("the two arrays are out of step"); end
      if (ov_e) begin
        if (int'(oi_e) != k) begin failures++; $display("output index %0d, expected %0d", oi_e, k); end
        for (int f = 0; f < K; f++) begin
          oer[f][k] = ye_re[f]; oei[f][k] = ye_im[f];
          osr[f][k] = ys_re[f]; osi[f][k] = ys_im[f];
        end
        got_loc_e = loc_e; got_loc_s = loc_s;
        got_ce_e = ce_e; got_ce_s = ce_s; got_un_e = un_e; got_un_s = un_s;
        k++;
      end
    end
    repeat (2) @(negedge clk);
  endtask

  // compares the outputs of one array with the DFT; tol in output LSBs
  task automatic check_spectra(input int m, input bit ecc, input int tol, input string what);
    int np = 4 ** m;
    real pi2 = 2.0 * 3.14159265358979323846;
    real sc = 1.0 / $sqrt(real'(np));
    int bad = 0, maxerr = 0;
    for (int f = 0; f < K; f++)
      for (int k = 0; k < np; k++) begin
        real sr = 0.0, si = 0.0;
        int er, ei;
        for (int n = 0; n < np; n++) begin
          real a = pi2 * real'((n * k) % np) / real'(np);
          sr += real'(xr[f][n]) * $cos(a) + real'(xi[f][n]) * $sin(a);
          si += real'(xi[f][n]) * $cos(a) - real'(xr[f][n]) * $sin(a);
        end
        er = (ecc ? oer[f][k] : osr[f][k]) - $rtoi($floor(sr * sc + 0.5));
        ei = (ecc ? oei[f][k] : osi[f][k]) - $rtoi($floor(si * sc + 0.5));
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
        if (er > tol || ei > tol) bad++;
      end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s (%s): %0d output values off, max error %0d", what, ecc ? "ECC" : "SOS", bad, maxerr);
    end
  endtask

  task automatic expect_status(input string what,
                               input logic [RE-1:0] syn_e_x, input int loc_e_x, input bit ce_e_x,
                               input logic [RS-1:0] syn_s_x, input int loc_s_x, input bit un_s_x);
    checks++;
    if (got_syn_e !== syn_e_x || got_loc_e != loc_e_x || got_ce_e != ce_e_x || got_un_e) begin
      failures++;
      $display("%s (ECC): syndrome %b loc %0d check_error %0d uncorrectable %0d, expected %b %0d %0d 0",
               what, got_syn_e, got_loc_e, got_ce_e, got_un_e, syn_e_x, loc_e_x, ce_e_x);
    end
    checks++;
    if (got_syn_s !== syn_s_x || got_loc_s != loc_s_x || got_un_s != un_s_x || got_ce_s) begin
      failures++;
      $display("%s (SOS): syndrome %b loc %0d uncorrectable %0d check_error %0d, expected %b %0d %0d 0",
               what, got_syn_s, got_loc_s, got_un_s, got_ce_s, syn_s_x, loc_s_x, un_s_x);
    end
  endtask

  task automatic clear_faults();
    fi_fft_e = '0; fi_fft_s = '0; fi_check_e = '0; fi_check_s = '0; fi_coef = 0;
  endtask

  // syndrome columns of the error-location table, FFT 1..4
  localparam logic [2:0] COL_E [K] = '{3'b111, 3'b110, 3'b101, 3'b011};

  initial begin
    in_valid = 0; cfg_stages = 3'd3;
    for (int f = 0; f < K; f++) begin x_re[f] = 0; x_im[f] = 0; end
    fi_stage = 3'd2; fi_addr = 10'd21; fi_mask_re = 16'h1000; fi_mask_im = 16'h0;
    clear_faults();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // clean block
    run_block(3);
    expect_status("clean", 3'b000, 0, 0, 4'b0000, 0, 0);
    check_spectra(3, 1, 4, "clean"); check_spectra(3, 0, 4, "clean");

    // one soft error in each FFT in turn
    for (int f = 0; f < K; f++) begin
      fi_fft_e[f] = 1; fi_fft_s[f] = 1;
      fi_addr = 10'(5 + 13 * f);
      run_block(3);
      clear_faults();
      expect_status($sformatf("error in FFT %0d", f + 1), COL_E[f], f + 1, 0,
                    4'(4'b1000 >> f), f + 1, 0);
      check_spectra(3, 1, 12, "corrected"); check_spectra(3, 0, 12, "corrected");
    end

    // an upset in a rotation coefficient of FFT 2 (W^0 of the first pass,
    // real part 1.0 -> 1.25): many outputs of that FFT are wrong, and the
    // whole FFT is rebuilt from the parity FFT
    fi_fft_e[1] = 1; fi_fft_s[1] = 1; fi_coef = 1; fi_stage = 3'd1; fi_addr = 10'd0;
    run_block(3);
    clear_faults(); fi_stage = 3'd2; fi_addr = 10'd21;
    expect_status("coefficient upset in FFT 2", COL_E[1], 2, 0, 4'b0100, 2, 0);
    check_spectra(3, 1, 12, "coefficient corrected"); check_spectra(3, 0, 12, "coefficient corrected");

    // error in the parity FFT: nothing to do
    fi_fft_e[K] = 1; fi_fft_s[K] = 1; fi_mask_re = 16'h2000;
    run_block(3);
    clear_faults(); fi_mask_re = 16'h1000;
    expect_status("error in parity FFT", 3'b000, 0, 0, 4'b0000, 0, 0);
    check_spectra(3, 1, 4, "parity error"); check_spectra(3, 0, 4, "parity error");

    // a check hit by an error
    fi_check_e = 3'b010; fi_check_s = 4'b0010;
    run_block(3);
    clear_faults();
    expect_status("check error", 3'b010, 0, 1, 4'b0010, 3, 0);
    check_spectra(3, 1, 4, "check error"); check_spectra(3, 0, 12, "check error");

    // two FFTs in error: the one-check-per-FFT array must refuse to correct
    fi_fft_s[0] = 1; fi_fft_s[2] = 1;
    run_block(3);
    clear_faults();
    checks++;
    if (!(got_un_s && got_syn_s == 4'b1010 && got_loc_s == 0)) begin
      failures++; $display("double error (SOS): syndrome %b uncorrectable %0d", got_syn_s, got_un_s);
    end

    // full-size block with an error in FFT 3; the verdict comes 5*1024 + 8
    // cycles after the last input
    fi_fft_e[2] = 1; fi_fft_s[2] = 1; fi_stage = 3'd4; fi_addr = 10'd700;
    fi_mask_re = 16'h0800; fi_mask_im = 16'h0800;
    run_block(5);
    clear_faults();
    checks++;
    if (t_status - t_last_in != 5 * 1024 + 9) begin
      failures++; $display("verdict after %0d cycles, expected %0d", t_status - t_last_in, 5 * 1024 + 9);
    end
    expect_status("1024 points, error in FFT 3", COL_E[2], 3, 0, 4'b0010, 3, 0);
    check_spectra(5, 1, 40, "1024 corrected"); check_spectra(5, 0, 40, "1024 corrected");

    // and a clean full-size block raises no alarm
    run_block(5);
    expect_status("1024 points clean", 3'b000, 0, 0, 4'b0000, 0, 0);
    check_spectra(5, 1, 10, "1024 clean"); check_spectra(5, 0, 10, "1024 clean");

    checks++;
    if (mm_e || mm_s) begin failures++; $display("TMR copies disagree"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
