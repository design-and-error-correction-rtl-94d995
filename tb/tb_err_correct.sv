// Self-checking testbench for err_correct with four FFTs, for both check
// arrangements. For random FFT outputs and a parity output equal to their sum
// plus an error on one of them, every possible syndrome is applied. Expected
// behaviour, written out here from the error-location table: Hamming checks
// 111/110/101/011 name FFT 1/2/3/4, single-bit patterns are check errors;
// one check per FFT: 1000/0100/0010/0001 name FFT 1..4, anything with more than
// one bit is uncorrectable. A named FFT's output must equal the parity output
// minus the other three; all other outputs pass unchanged.
module tb_err_correct;
  import fft_pkg::*;
  localparam int K = 4, DW = 14, PW = 16;

  logic signed [DW-1:0] x_re [K], x_im [K];
  logic signed [PW-1:0] p_re, p_im;
  logic [2:0] syn_e;
  logic [3:0] syn_s;
  logic signed [DW-1:0] ye_re [K], ye_im [K], ys_re [K], ys_im [K];
  logic [2:0] loc_e, loc_s;
  logic ce_e, ce_s, un_e, un_s;

  err_correct #(.K(K), .SCHEME(SCHEME_PARITY_SOS_ECC), .DW(DW), .PW(PW)) dut_e (
    .syndrome(syn_e), .x_re, .x_im, .p_re, .p_im, .y_re(ye_re), .y_im(ye_im),
    .err_loc(loc_e), .check_error(ce_e), .uncorrectable(un_e));
  err_correct #(.K(K), .SCHEME(SCHEME_PARITY_SOS), .DW(DW), .PW(PW)) dut_s (
    .syndrome(syn_s), .x_re, .x_im, .p_re, .p_im, .y_re(ys_re), .y_im(ys_im),
    .err_loc(loc_s), .check_error(ce_s), .uncorrectable(un_s));

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int loc_table_e(int s);
    case (s)
      7: return 1;
      6: return 2;
      5: return 3;
      3: return 4;
      default: return 0;
    endcase
  endfunction

  function automatic int loc_table_s(int s);
    case (s)
      8: return 1;
      4: return 2;
      2: return 3;
      1: return 4;
      default: return 0;
    endcase
  endfunction

  int vr [K], vi [K], tr, ti;

  task automatic check_one(input bit ecc, input int s);
    int loc, er, ei;
    bit exp_ce, exp_un;
    int bits = 0;
    for (int b = 0; b < 4; b++) bits += (s >> b) & 1;
    loc = ecc ? loc_table_e(s) : loc_table_s(s);
    exp_ce = ecc && loc == 0 && bits == 1;
    exp_un = loc == 0 && s != 0 && !exp_ce;
    checks++;
    if ((ecc ? int'(loc_e) : int'(loc_s)) != loc ||
        (ecc ? ce_e : ce_s) != exp_ce || (ecc ? un_e : un_s) != exp_un) begin
      failures++;
      $display("%s syndrome %b: loc %0d ce %0d un %0d", ecc ? "ECC" : "SOS", s,
               ecc ? loc_e : loc_s, ecc ? ce_e : ce_s, ecc ? un_e : un_s);
    end
    for (int i = 0; i < K; i++) begin
      if (loc == i + 1) begin
        er = tr; ei = ti;
        for (int j = 0; j < K; j++) if (j != i) begin er -= vr[j]; ei -= vi[j]; end
        if (er > 8191) er = 8191;
        if (er < -8192) er = -8192;
        if (ei > 8191) ei = 8191;
        if (ei < -8192) ei = -8192;
      end else begin
        er = vr[i]; ei = vi[i];
      end
      checks++;
      if ((ecc ? int'(ye_re[i]) : int'(ys_re[i])) != er || (ecc ? int'(ye_im[i]) : int'(ys_im[i])) != ei) begin
        failures++;
        $display("%s syndrome %b output %0d: got (%0d,%0d) expected (%0d,%0d)", ecc ? "ECC" : "SOS", s, i,
                 ecc ? ye_re[i] : ys_re[i], ecc ? ye_im[i] : ys_im[i], er, ei);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      int bad;
      tr = 0; ti = 0;
      for (int i = 0; i < K; i++) begin
        vr[i] = $signed($urandom_range(12000)) - 6000;
        vi[i] = $signed($urandom_range(12000)) - 6000;
        tr += vr[i]; ti += vi[i];
      end
      // the outputs seen by the corrector carry an error on one FFT
      bad = n % K;
      for (int i = 0; i < K; i++) begin
        x_re[i] = DW'(i == bad ? vr[i] + 1000 : vr[i]);
        x_im[i] = DW'(vi[i]);
      end
      vr[bad] = int'(x_re[bad]);
      p_re = PW'(tr); p_im = PW'(ti);
      for (int s = 0; s < 8; s++) begin
        syn_e = 3'(s); syn_s = '0; #1; check_one(1'b1, s);
      end
      for (int s = 0; s < 16; s++) begin
        syn_s = 4'(s); #1; check_one(1'b0, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
