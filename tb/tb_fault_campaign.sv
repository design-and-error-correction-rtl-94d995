// Fault-injection campaign on both protection schemes at full size (four
// 1024-point FFTs each, default parameters).
//
// One fixed block of random inputs is transformed once without errors to get
// the reference outputs (and to check that a clean block raises no alarm).
// Then NINJ blocks are run with the same inputs and one single-bit soft error
// each, at a random place: a random FFT (the parity FFT included), the load or
// a random pass, a random stage-RAM address, a random bit of the real or
// imaginary part. A block counts as protected when all its outputs are within
// TOL of the reference, whether the error was corrected or too small to
// matter. The Parseval check only detects an error whose energy stands out
// from the signal and the rounding noise, so small errors pass undetected and
// even large ones are sometimes masked. The test requires no false alarm on
// the clean block and, for each scheme, correct outputs after at least 75% of
// the errors of magnitude 2^11 or more in the original FFTs.
//
// Then NCOEF blocks each carry one upset in a rotation coefficient instead: a
// random FFT, a random pass, one of the coefficients that pass uses, a random
// bit of its real or imaginary part, held for the whole pass. Such an upset
// can spoil many outputs of one FFT. The test requires that whenever a scheme
// names the right FFT, all its outputs are correct, and that this happens at
// least once per scheme. The counts are printed for both schemes.
module tb_fault_campaign;
  import fft_pkg::*;
  localparam int K = 4, IN_W = 12, OUT_W = 14, NP = 1024, NINJ = 5000, NCOEF = 5000, TOL = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic signed [IN_W-1:0] x_re [K], x_im [K];
  logic [2:0] fi_stage;
  logic [9:0] fi_addr;
  logic [15:0] fi_mask_re, fi_mask_im;
  logic [K:0] fi_fft;
  logic fi_coef;
  logic rdy_e, sv_e, ce_e, un_e, mm_e, ov_e, ol_e, rdy_s, sv_s, ce_s, un_s, mm_s, ov_s, ol_s;
  logic [2:0] syn_e, loc_e, loc_s;
  logic [3:0] syn_s;
  logic [9:0] oi_e, oi_s;
  logic signed [OUT_W-1:0] ye_re [K], ye_im [K], ys_re [K], ys_im [K];

  pfft_system #(.SCHEME(SCHEME_PARITY_SOS_ECC)) dut_e (
    .clk, .rst_n, .cfg_stages(3'd5), .in_valid, .in_ready(rdy_e), .x_re, .x_im,
    .status_valid(sv_e), .syndrome(syn_e), .err_loc(loc_e), .check_error(ce_e),
    .uncorrectable(un_e), .tmr_mismatch(mm_e),
    .out_valid(ov_e), .out_last(ol_e), .out_idx(oi_e), .y_re(ye_re), .y_im(ye_im),
    .fi_fft, .fi_coef, .fi_stage, .fi_addr, .fi_mask_re, .fi_mask_im, .fi_check(3'b000));
  pfft_system #(.SCHEME(SCHEME_PARITY_SOS)) dut_s (
    .clk, .rst_n, .cfg_stages(3'd5), .in_valid, .in_ready(rdy_s), .x_re, .x_im,
    .status_valid(sv_s), .syndrome(syn_s), .err_loc(loc_s), .check_error(ce_s),
    .uncorrectable(un_s), .tmr_mismatch(mm_s),
    .out_valid(ov_s), .out_last(ol_s), .out_idx(oi_s), .y_re(ys_re), .y_im(ys_im),
    .fi_fft, .fi_coef, .fi_stage, .fi_addr, .fi_mask_re, .fi_mask_im, .fi_check(4'b0000));

  int checks = 0, failures = 0;

  initial begin
    repeat ((NINJ + NCOEF) * 8000 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [K][NP], xi [K][NP];
  int ge [2][K][NP][2];        // reference outputs: [scheme][fft][bin][re/im]
  int maxdev [2];
  bit detected [2];
  int located [2];

  // runs the fixed block; returns the largest deviation from the reference
  task automatic run_block(input bit reference);
    int k = 0;
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      in_valid = 1;
      for (int f = 0; f < K; f++) begin x_re[f] = IN_W'(xr[f][i]); x_im[f] = IN_W'(xi[f][i]); end
      @(negedge clk);
    end
    in_valid = 0;
    while (!sv_e) @(negedge clk);
    detected[0] = (syn_e != 0);
    detected[1] = (syn_s != 0);
    located = '{int'(loc_e), int'(loc_s)};
    maxdev = '{0, 0};
    while (k < NP) begin
      @(negedge clk);
      if (ov_e) begin
        for (int f = 0; f < K; f++) begin
          int v [2][2];
          v[0] = '{int'(ye_re[f]), int'(ye_im[f])};
          v[1] = '{int'(ys_re[f]), int'(ys_im[f])};
          for (int s = 0; s < 2; s++)
            for (int c = 0; c < 2; c++) begin
              int d;
              if (reference) ge[s][f][k][c] = v[s][c];
              d = v[s][c] - ge[s][f][k][c];
              if (d < 0) d = -d;
              if (d > maxdev[s]) maxdev[s] = d;
            end
        end
        k++;
      end
    end
  endtask

  int n_det [2], n_ok [2], n_big [2], n_big_ok [2];
  int c_det [2], c_ok [2], c_loc [2], c_loc_ok [2];

  initial begin
    in_valid = 0; fi_fft = '0; fi_coef = 0; fi_stage = 0; fi_addr = 0; fi_mask_re = 0; fi_mask_im = 0;
    for (int f = 0; f < K; f++) begin x_re[f] = 0; x_im[f] = 0; end
    for (int f = 0; f < K; f++)
      for (int i = 0; i < NP; i++) begin
        xr[f][i] = $signed($urandom_range(3000)) - 1500;
        xi[f][i] = $signed($urandom_range(3000)) - 1500;
      end
    n_det = '{0, 0}; c_det = '{0, 0}; c_ok = '{0, 0}; c_loc = '{0, 0}; c_loc_ok = '{0, 0}; n_ok = '{0, 0}; n_big = '{0, 0}; n_big_ok = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;

    run_block(1'b1);
    checks++;
    if (detected[0] || detected[1]) begin failures++; $display("false alarm on the clean block"); end

    for (int n = 0; n < NINJ; n++) begin
      int f, bitpos, width;
      bit on_im;
      f = $urandom_range(K);
      width = (f == K) ? 16 : 14;
      bitpos = $urandom_range(width - 1);
      on_im = $urandom_range(1);
      fi_fft = '0;
      fi_fft[f] = 1'b1;
      fi_stage = 3'($urandom_range(5));
      fi_addr = 10'($urandom_range(NP - 1));
      fi_mask_re = on_im ? 16'h0 : 16'(1 << bitpos);
      fi_mask_im = on_im ? 16'(1 << bitpos) : 16'h0;
      run_block(1'b0);
      fi_fft = '0;
      for (int s = 0; s < 2; s++) begin
        bit ok, big;
        ok = (maxdev[s] <= TOL);
        // a flip of bit b changes the word by 2^b; the top bit is the sign
        big = (bitpos >= 11) && (f < K);
        n_det[s] += int'(detected[s]);
        n_ok[s] += int'(ok);
        n_big[s] += int'(big);
        n_big_ok[s] += int'(big && ok);
        if (big && !ok)
          $display("%s: large error (FFT %0d pass %0d addr %0d bit %0d) missed, outputs off by %0d",
                   s == 0 ? "parity-SOS-ECC" : "parity-SOS", f + 1, fi_stage, fi_addr, bitpos, maxdev[s]);
      end
    end
    for (int s = 0; s < 2; s++)
      $display("%s: %0d injected, %0d detected, %0d with correct outputs (%0d of %0d large errors)",
               s == 0 ? "parity-SOS-ECC" : "parity-SOS", NINJ, n_det[s], n_ok[s], n_big_ok[s], n_big[s]);
    // upsets in the rotation coefficients
    fi_coef = 1;
    for (int n = 0; n < NCOEF; n++) begin
      int f, bitpos, p, j, q;
      bit on_im;
      f = $urandom_range(K);
      p = $urandom_range(4);
      j = $urandom_range((1 << (2 * (4 - p))) - 1);
      q = $urandom_range(3);
      bitpos = $urandom_range(13);
      on_im = $urandom_range(1);
      fi_fft = '0;
      fi_fft[f] = 1'b1;
      fi_stage = 3'(p + 1);
      fi_addr = 10'((q * j) << (2 * p));
      fi_mask_re = on_im ? 16'h0 : 16'(1 << bitpos);
      fi_mask_im = on_im ? 16'(1 << bitpos) : 16'h0;
      run_block(1'b0);
      fi_fft = '0;
      for (int s = 0; s < 2; s++) begin
        bit ok, loc;
        ok = (maxdev[s] <= TOL);
        loc = (f < K) && (located[s] == f + 1);
        c_det[s] += int'(detected[s]);
        c_ok[s] += int'(ok);
        c_loc[s] += int'(loc);
        c_loc_ok[s] += int'(loc && ok);
        checks++;
        if (loc && !ok) begin
          failures++;
          $display("%s: coefficient upset (FFT %0d pass %0d W^%0d bit %0d) located but outputs off by %0d",
                   s == 0 ? "parity-SOS-ECC" : "parity-SOS", f + 1, p + 1, fi_addr, bitpos, maxdev[s]);
        end
      end
    end
    fi_coef = 0;
    for (int s = 0; s < 2; s++)
      $display("%s: %0d coefficient upsets, %0d detected, %0d located and corrected, %0d with correct outputs",
               s == 0 ? "parity-SOS-ECC" : "parity-SOS", NCOEF, c_det[s], c_loc_ok[s], c_ok[s]);

    for (int s = 0; s < 2; s++) begin
      checks++;
      if (c_loc[s] == 0) begin failures++; $display("no coefficient upset was located"); end
      checks++;
      if (n_big[s] == 0 || 4 * n_big_ok[s] < 3 * n_big[s]) begin
        failures++; $display("coverage of large errors too low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
