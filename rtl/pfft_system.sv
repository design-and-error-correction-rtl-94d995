// K parallel FFTs protected against soft errors by one parity FFT and
// Parseval (sum-of-squares) checks.
//
// All K + 1 FFT cores run in lockstep on the same block timing. The parity FFT
// transforms the sum of the K inputs; since the FFT is linear, its output
// equals the sum of the K outputs, so any single output can be rebuilt from it
// and the other K - 1. The checks say which one to rebuild. SCHEME picks how:
//   SCHEME_PARITY_SOS      (first technique) one Parseval check per FFT,
//                          R = K checks.
//   SCHEME_PARITY_SOS_ECC  (second technique) R Parseval checks, each on the
//                          sum of a group of FFTs (inputs x1+x2+x3 against
//                          outputs X1+X2+X3, ...), the groups being the parity
//                          checks of a Hamming code, R = 3 for K = 4.
// A check's output side is fed by the last-pass writes of the cores, so the
// verdict is ready two cycles after the transform ends; the cores then unload
// and the correction logic repairs the one output in error, if any, on the fly.
// The adders feeding the parity FFT and the checks, and the correction logic,
// are triplicated and voted (tmr_voter). Immediate assertions check in
// simulation that the cores' handshakes stay in lockstep.
//
// Interface and timing, per block of N' = 4^cfg_stages samples:
//   in_valid/in_ready, x_*   one sample of each of the K inputs per cycle
//                            while loading (N' cycles).
//   status_valid             one-cycle pulse when the checks are decided,
//                            cfg_stages*N' + 9 cycles after the last input;
//                            syndrome, err_loc, check_error and uncorrectable
//                            are then held for the block's output.
//   out_valid, y_*           N' output samples of each FFT in natural order,
//                            starting two cycles after status_valid.
//   fi_fft/fi_*, fi_check    soft-error injection for test: fi_fft[i] enables
//                            the injection port of FFT i (i = K is the parity
//                            FFT), fi_coef moves the upset from the stage
//                            RAM to a rotation coefficient (see fft_r4);
//                            fi_check inverts syndrome bits (bit R-1 is
//                            check c1).
//                            Tie low in normal use.
//
// Following the document: both schemes, the parity FFT with widths extended by
// two bits (14-bit input, 16-bit output for K = 4), the check groups of the
// error-location table, correction by Xi = X - sum of the others, and TMR on the
// adders and the correction logic. This design's own choices: the lockstep
// control, checking the last-pass writes, how patterns that name no FFT are
// reported, and the injection ports.
module pfft_system
  import fft_pkg::*;
#(
  parameter int      K         = 4,
  parameter scheme_e SCHEME    = SCHEME_PARITY_SOS_ECC,
  parameter int      LOG4N     = 5,
  parameter int      IN_W      = 12,
  parameter int      OUT_W     = 14,
  parameter int      ACC_W     = 39,
  parameter int      TAU       = 1,
  parameter int      TAU_SHIFT = 21,
  // derived
  parameter int      R         = num_checks(K, SCHEME),
  parameter int      PIN_W     = IN_W + clog2i(K),
  parameter int      POUT_W    = OUT_W + clog2i(K),
  parameter int      LW        = $clog2(K + 1),
  parameter int      SW        = $clog2(LOG4N + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [SW-1:0]             cfg_stages,
  // inputs
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [IN_W-1:0]    x_re [K],
  input  logic signed [IN_W-1:0]    x_im [K],
  // block verdict
  output logic                      status_valid,
  output logic [R-1:0]              syndrome,
  output logic [LW-1:0]             err_loc,
  output logic                      check_error,
  output logic                      uncorrectable,
  output logic                      tmr_mismatch,
  // outputs
  output logic                      out_valid,
  output logic                      out_last,
  output logic [2*LOG4N-1:0]        out_idx,
  output logic signed [OUT_W-1:0]   y_re [K],
  output logic signed [OUT_W-1:0]   y_im [K],
  // soft-error injection
  input  logic [K:0]                fi_fft,
  input  logic                      fi_coef,
  input  logic [SW-1:0]             fi_stage,
  input  logic [2*LOG4N-1:0]        fi_addr,
  input  logic [POUT_W-1:0]         fi_mask_re,
  input  logic [POUT_W-1:0]         fi_mask_im,
  input  logic [R-1:0]              fi_check
);

  // ------------------------------------------------------------ input adders (TMR)
  logic signed [PIN_W-1:0] px_re, px_im;
  logic                    mm_par;

  begin : g_par_in
    logic signed [PIN_W-1:0] s_re [3], s_im [3];
    for (genvar t = 0; t < 3; t++) begin : g_copy
      comb_adder #(.K(K), .IN_W(IN_W), .OUT_W(PIN_W), .MASK((32'd1 << K) - 1)) u_add (
        .in_re(x_re), .in_im(x_im), .sum_re(s_re[t]), .sum_im(s_im[t]));
    end
    tmr_voter #(.W(2*PIN_W)) u_vote (
      .a({s_re[0], s_im[0]}), .b({s_re[1], s_im[1]}), .c({s_re[2], s_im[2]}),
      .y({px_re, px_im}), .mismatch(mm_par));
  end

  // ------------------------------------------------------------ FFT cores
  logic                    rdy    [K+1];
  logic                    res_v  [K+1];
  logic                    res_l  [K+1];
  logic                    tdone  [K+1];
  logic                    o_v    [K+1];
  logic                    o_l    [K+1];
  logic                    bsy    [K+1];
  logic [2*LOG4N-1:0]      o_idx  [K+1];
  logic signed [OUT_W-1:0] r_re   [K], r_im [K];     // last-pass writes
  logic signed [OUT_W-1:0] z_re   [K], z_im [K];     // unloaded outputs
  logic signed [POUT_W-1:0] pr_re, pr_im, pz_re, pz_im;
  logic                    unload_go;

  for (genvar i = 0; i < K; i++) begin : g_fft
    fft_r4 #(.LOG4N(LOG4N), .IN_W(IN_W), .DW(OUT_W)) u_fft (
      .clk, .rst_n, .cfg_stages,
      .in_valid, .in_ready(rdy[i]), .in_re(x_re[i]), .in_im(x_im[i]),
      .res_valid(res_v[i]), .res_last(res_l[i]), .res_re(r_re[i]), .res_im(r_im[i]),
      .unload_go, .transform_done(tdone[i]),
      .out_valid(o_v[i]), .out_last(o_l[i]), .out_idx(o_idx[i]),
      .out_re(z_re[i]), .out_im(z_im[i]), .busy(bsy[i]),
      .fi_en(fi_fft[i]), .fi_coef, .fi_stage, .fi_addr,
      .fi_mask({fi_mask_re[OUT_W-1:0], fi_mask_im[OUT_W-1:0]}));
  end

  fft_r4 #(.LOG4N(LOG4N), .IN_W(PIN_W), .DW(POUT_W)) u_parity_fft (
    .clk, .rst_n, .cfg_stages,
    .in_valid, .in_ready(rdy[K]), .in_re(px_re), .in_im(px_im),
    .res_valid(res_v[K]), .res_last(res_l[K]), .res_re(pr_re), .res_im(pr_im),
    .unload_go, .transform_done(tdone[K]),
    .out_valid(o_v[K]), .out_last(o_l[K]), .out_idx(o_idx[K]),
    .out_re(pz_re), .out_im(pz_im), .busy(bsy[K]),
    .fi_en(fi_fft[K]), .fi_coef, .fi_stage, .fi_addr, .fi_mask({fi_mask_re, fi_mask_im}));

  assign in_ready = rdy[0];

  // ------------------------------------------------------------ Parseval checks
  logic [R-1:0] flag, flag_v, mm_chk;
  logic         eval;

  for (genvar c = 0; c < R; c++) begin : g_chk
    localparam logic [31:0] GRP = check_group(c, K, R, SCHEME);
    logic signed [PIN_W-1:0]  ci_re [3], ci_im [3], cin_re, cin_im;
    logic signed [POUT_W-1:0] co_re [3], co_im [3], cout_re, cout_im;
    logic mm_i, mm_o;

    for (genvar t = 0; t < 3; t++) begin : g_copy
      comb_adder #(.K(K), .IN_W(IN_W), .OUT_W(PIN_W), .MASK(GRP)) u_add_in (
        .in_re(x_re), .in_im(x_im), .sum_re(ci_re[t]), .sum_im(ci_im[t]));
      comb_adder #(.K(K), .IN_W(OUT_W), .OUT_W(POUT_W), .MASK(GRP)) u_add_out (
        .in_re(r_re), .in_im(r_im), .sum_re(co_re[t]), .sum_im(co_im[t]));
    end
    tmr_voter #(.W(2*PIN_W)) u_vote_in (
      .a({ci_re[0], ci_im[0]}), .b({ci_re[1], ci_im[1]}), .c({ci_re[2], ci_im[2]}),
      .y({cin_re, cin_im}), .mismatch(mm_i));
    tmr_voter #(.W(2*POUT_W)) u_vote_out (
      .a({co_re[0], co_im[0]}), .b({co_re[1], co_im[1]}), .c({co_re[2], co_im[2]}),
      .y({cout_re, cout_im}), .mismatch(mm_o));
    assign mm_chk[c] = mm_i || mm_o;

    parseval_check #(.IN_W(PIN_W), .OUT_W(POUT_W), .ACC_W(ACC_W),
                     .TAU(TAU), .TAU_SHIFT(TAU_SHIFT)) u_check (
      .clk, .rst_n,
      .in_valid(in_valid && in_ready), .in_re(cin_re), .in_im(cin_im),
      .out_valid(res_v[0]), .out_re(cout_re), .out_im(cout_im),
      .eval(eval), .flag(flag[R-1-c]), .flag_valid(flag_v[R-1-c]),
      .sos_in(), .sos_out());
  end

  // ------------------------------------------------------------ block control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval         <= 1'b0;
      status_valid <= 1'b0;
      syndrome     <= '0;
      unload_go    <= 1'b0;
    end else begin
      // the cores must stay in lockstep: same handshake, same phase
      for (int i = 1; i <= K; i++)
        assert (rdy[i] == rdy[0] && res_v[i] == res_v[0] && res_l[i] == res_l[0] &&
                tdone[i] == tdone[0] && o_v[i] == o_v[0] && bsy[i] == bsy[0] &&
                o_idx[i] == o_idx[0])
          else $error("FFT core %0d out of step with core 0", i);
      assert (flag_v == '0 || flag_v == '1) else $error("checks out of step");
      // every verdict releases the block's output
      assert (!status_valid || unload_go) else $error("verdict without unload");
      eval         <= res_l[0];
      status_valid <= flag_v[R-1];
      if (flag_v[R-1]) begin
        syndrome  <= flag ^ fi_check;
        unload_go <= 1'b1;
      end else if (o_v[0]) begin
        unload_go <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ correction (TMR)
  logic signed [OUT_W-1:0] yc_re [3][K], yc_im [3][K];
  logic [LW-1:0]           loc_c [3];
  logic                    ce_c  [3], un_c [3];
  logic [K*2*OUT_W+LW+1:0] vote  [3];
  logic [K*2*OUT_W+LW+1:0] voted;
  logic                    mm_cor;

  for (genvar t = 0; t < 3; t++) begin : g_cor
    err_correct #(.K(K), .SCHEME(SCHEME), .R(R), .DW(OUT_W), .PW(POUT_W), .LW(LW)) u_cor (
      .syndrome, .x_re(z_re), .x_im(z_im), .p_re(pz_re), .p_im(pz_im),
      .y_re(yc_re[t]), .y_im(yc_im[t]),
      .err_loc(loc_c[t]), .check_error(ce_c[t]), .uncorrectable(un_c[t]));
    always_comb begin
      for (int i = 0; i < K; i++)
        vote[t][(2*i+1)*OUT_W + LW + 2 +: OUT_W] = yc_re[t][i];
      for (int i = 0; i < K; i++)
        vote[t][(2*i)*OUT_W + LW + 2 +: OUT_W] = yc_im[t][i];
      vote[t][LW+1:0] = {loc_c[t], ce_c[t], un_c[t]};
    end
  end

  tmr_voter #(.W(K*2*OUT_W+LW+2)) u_vote_cor (
    .a(vote[0]), .b(vote[1]), .c(vote[2]), .y(voted), .mismatch(mm_cor));

  always_comb begin
    for (int i = 0; i < K; i++) begin
      y_re[i] = voted[(2*i+1)*OUT_W + LW + 2 +: OUT_W];
      y_im[i] = voted[(2*i)*OUT_W + LW + 2 +: OUT_W];
    end
    {err_loc, check_error, uncorrectable} = voted[LW+1:0];
  end

  assign out_valid    = o_v[0];
  assign out_last     = o_l[0];
  assign out_idx      = o_idx[0];
  assign tmr_mismatch = mm_par || (|mm_chk) || mm_cor;

endmodule
