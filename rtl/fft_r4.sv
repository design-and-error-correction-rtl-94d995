// Iterative radix-4 decimation-in-frequency FFT, one sample per clock.
//
// A block of N' = 4^m complex samples (m = cfg_stages, 1..LOG4N, sampled when
// the first sample of a block is accepted) is streamed in, transformed in m radix-4 passes over
// a ping-pong stage RAM, and streamed out in natural frequency order. Each pass
// reads one sample per cycle, so a pass takes N' cycles and the whole transform
// m*N' cycles (5 * 1024 = 5120 for the default 1024 points), plus a six-cycle
// pipeline drain at the end: successive passes overlap, which is safe because
// every sample a pass reads was written by the previous pass at least one
// cycle before.
//
// Datapath: four reads fill a butterfly register, the 4-point butterfly is
// computed in one cycle, and a single complex multiplier applies the twiddle
// factor to the four results in turn while the next four reads are issued.
// Every pass scales by 1/2 with rounding (butterfly gain 4, then a shift by
// TW_FRAC + 1), so the transform is scaled by 1/sqrt(N'): the energy of the
// output block equals that of the input block (Parseval) with no extra factor,
// which is what the sum-of-squares checks rely on. Results saturate to DW bits.
// Twiddle factors W^e = cos(2*pi*e/N) - i*sin(2*pi*e/N) are held in a ROM
// computed at elaboration, rounded to TW_FRAC fractional bits.
//
// Interface:
//   in_valid/in_ready   sample input, accepted while loading.
//   res_*               every write of the last pass (the final spectrum, in
//                       base-4 digit-reversed order), for the Parseval checks.
//                       res_last marks the last one.
//   unload_go           after the transform the core waits (busy stays high)
//                       until unload_go is high, then streams out N' samples,
//                       out_valid for one cycle each, in natural order, and
//                       returns to loading.
//   fi_*                soft-error injection for test: while fi_en is high and
//                       fi_coef low, the word written to stage-RAM address
//                       fi_addr by pass fi_stage (0 = the load, p = pass p) is
//                       XORed with fi_mask ({re, im}). With fi_coef high the
//                       upset is in a rotation coefficient instead: every time
//                       pass fi_stage (1..m) uses W^e with e = fi_addr, the
//                       coefficient register holds W^e XOR fi_mask (each half
//                       of fi_mask applied to the low bits of the matching
//                       half of the coefficient). Tie fi_en low in normal use.
//
// Following the document: radix-4 DIF, iterative, one sample per cycle, N = 1024
// in five passes, programmable size, 12-bit input and 14-bit output. This
// design's own choices: the ping-pong RAM, the 1/2 scaling per pass, the
// twiddle ROM (the document computes the coefficients on line), the
// load/transform/unload sequencing without overlap between blocks, and the
// fault-injection port. Injecting into the coefficient register stands in for
// the document's upsets in its stored coefficients.
module fft_r4 #(
  parameter int LOG4N   = 5,   // log4 of the largest transform size
  parameter int IN_W    = 12,  // input sample width (re and im each)
  parameter int DW      = 14,  // stage RAM and output width
  parameter int TW_W    = 16,  // twiddle factor width
  parameter int TW_FRAC = 14   // twiddle fractional bits
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(LOG4N+1)-1:0]    cfg_stages,
  // input stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [IN_W-1:0]        in_re,
  input  logic signed [IN_W-1:0]        in_im,
  // last-pass writes, for checking
  output logic                          res_valid,
  output logic                          res_last,
  output logic signed [DW-1:0]          res_re,
  output logic signed [DW-1:0]          res_im,
  // output stream
  input  logic                          unload_go,
  output logic                          transform_done,
  output logic                          out_valid,
  output logic                          out_last,
  output logic [2*LOG4N-1:0]            out_idx,
  output logic signed [DW-1:0]          out_re,
  output logic signed [DW-1:0]          out_im,
  output logic                          busy,
  // soft-error injection
  input  logic                          fi_en,
  input  logic                          fi_coef,
  input  logic [$clog2(LOG4N+1)-1:0]    fi_stage,
  input  logic [2*LOG4N-1:0]            fi_addr,
  input  logic [2*DW-1:0]               fi_mask
);

  localparam int N    = 4 ** LOG4N;
  localparam int AW   = 2 * LOG4N;          // address within one bank
  localparam int SW   = $clog2(LOG4N + 1);
  localparam int NTW  = (LOG4N > 1) ? 3 * N / 4 : 1;
  localparam int TAW  = (NTW > 1) ? $clog2(NTW) : 1;
  localparam int BW   = DW + 2;             // butterfly result width
  localparam int PW   = BW + TW_W + 1;      // complex product width
  localparam int SHR  = TW_FRAC + 1;        // product shift: twiddle scale and 1/2
  localparam int PIPE = 6;                  // read issue to RAM write

  // ---------------------------------------------------------------- twiddle ROM
  typedef logic [2*TW_W-1:0] tw_rom_t [NTW];

  function automatic tw_rom_t gen_twiddles();
    tw_rom_t r;
    for (int e = 0; e < NTW; e++) begin
      real ang;
      longint c, s;
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      c   = longint'($floor($cos(ang) * real'(longint'(1) << TW_FRAC) + 0.5));
      s   = longint'($floor(-$sin(ang) * real'(longint'(1) << TW_FRAC) + 0.5));
      r[e] = {TW_W'(c), TW_W'(s)};
    end
    return r;
  endfunction

  localparam tw_rom_t TW_ROM = gen_twiddles();

  // ---------------------------------------------------------------- state
  typedef enum logic [1:0] {S_LOAD, S_COMP, S_WAIT, S_UNLOAD} state_e;
  state_e state;

  logic [SW-1:0]   m_q;        // number of passes of the current block
  logic [AW-1:0]   cnt;        // sample counter within a pass / load / unload
  logic [SW-1:0]   pass;       // pass being read
  logic [AW-1:0]   npts_m1;    // N' - 1

  assign npts_m1 = AW'((64'd1 << (2 * m_q)) - 64'd1);

  // the stage RAM: two banks of N complex words, bank = address MSB
  logic [2*DW-1:0] mem [2*N];

  // ---------------------------------------------------------------- pass pipeline
  typedef struct packed {
    logic          valid;
    logic [1:0]    q;      // position within the butterfly
    logic [AW-1:0] addr;   // address within the bank
    logic [SW-1:0] pass;
    logic [TAW-1:0] texp;  // twiddle exponent for this output
    logic          last;   // last read of the transform
  } pipe_t;

  pipe_t pipe [PIPE+1];    // pipe[0] is the read being issued

  // address and twiddle exponent of butterfly b, element q, in pass p
  logic [AW-1:0]  rd_idx;
  logic [TAW-1:0] rd_texp;
  always_comb begin
    int unsigned sh, b, j, g;
    logic [31:0] e;
    sh = 2 * (int'(m_q) - 1 - int'(pass));
    b  = int'(cnt) >> 2;
    j  = b & ((1 << sh) - 1);
    g  = b >> sh;
    rd_idx  = AW'((g << (sh + 2)) | (int'(cnt[1:0]) << sh) | j);
    e       = (int'(cnt[1:0]) * j) << (2 * (LOG4N - int'(m_q) + int'(pass)));
    rd_texp = e[TAW-1:0];
  end

  always_comb begin
    pipe[0].valid = (state == S_COMP);
    pipe[0].q     = cnt[1:0];
    pipe[0].addr  = rd_idx;
    pipe[0].pass  = pass;
    pipe[0].texp  = rd_texp;
    pipe[0].last  = (pass == m_q - 1'b1) && (cnt == npts_m1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= PIPE; i++) pipe[i] <= '0;
    end else begin
      for (int i = 1; i <= PIPE; i++) pipe[i] <= pipe[i-1];
    end
  end

  // ---------------------------------------------------------------- RAM read port
  logic          ul_valid;  // unload read issued this cycle
  logic [AW:0]   raddr;
  logic [2*DW-1:0] rdata;

  // base-4 digit reversal of k over m_q digits
  function automatic logic [AW-1:0] digit_rev(logic [AW-1:0] k, logic [SW-1:0] m);
    logic [AW-1:0] r;
    for (int d = 0; d < LOG4N; d++) r[2*d +: 2] = k[2*(LOG4N-1-d) +: 2];
    return r >> (2 * (LOG4N - int'(m)));
  endfunction

  assign ul_valid = (state == S_UNLOAD);

  always_comb begin
    if (ul_valid) raddr = {m_q[0], digit_rev(cnt, m_q)};
    else          raddr = {pass[0], rd_idx};
  end

  always_ff @(posedge clk) rdata <= mem[raddr];

  // ---------------------------------------------------------------- butterfly
  logic signed [DW-1:0] a_re [3];
  logic signed [DW-1:0] a_im [3];
  logic signed [BW-1:0] y_re [4];
  logic signed [BW-1:0] y_im [4];
  logic signed [DW-1:0] r_re, r_im;

  assign r_re = rdata[2*DW-1:DW];
  assign r_im = rdata[DW-1:0];

  always_ff @(posedge clk) begin
    if (pipe[1].valid) begin
      if (pipe[1].q != 2'd3) begin
        a_re[pipe[1].q] <= r_re;
        a_im[pipe[1].q] <= r_im;
      end else begin
        logic signed [BW-1:0] s02r, s02i, d02r, d02i, s13r, s13i, d13r, d13i;
        s02r = BW'(a_re[0]) + BW'(a_re[2]);  s02i = BW'(a_im[0]) + BW'(a_im[2]);
        d02r = BW'(a_re[0]) - BW'(a_re[2]);  d02i = BW'(a_im[0]) - BW'(a_im[2]);
        s13r = BW'(a_re[1]) + BW'(r_re);     s13i = BW'(a_im[1]) + BW'(r_im);
        d13r = BW'(a_re[1]) - BW'(r_re);     d13i = BW'(a_im[1]) - BW'(r_im);
        y_re[0] <= s02r + s13r;  y_im[0] <= s02i + s13i;
        y_re[1] <= d02r + d13i;  y_im[1] <= d02i - d13r;   // (a0-a2) - j(a1-a3)
        y_re[2] <= s02r - s13r;  y_im[2] <= s02i - s13i;
        y_re[3] <= d02r - d13i;  y_im[3] <= d02i + d13r;   // (a0-a2) + j(a1-a3)
      end
    end
  end

  // ---------------------------------------------------------------- twiddle multiply
  // ROM read at pipe stage 4, product at stage 5, RAM write at stage 6.
  logic [2*TW_W-1:0] tw_q;
  logic [2*TW_W-1:0] tw_fi;
  always_comb begin
    tw_fi = '0;
    if (fi_en && fi_coef && SW'(pipe[4].pass + 1'b1) == fi_stage &&
        pipe[4].texp == TAW'(fi_addr))
      tw_fi = {TW_W'(fi_mask[2*DW-1:DW]), TW_W'(fi_mask[DW-1:0])};
  end
  always_ff @(posedge clk) tw_q <= TW_ROM[pipe[4].texp] ^ tw_fi;

  function automatic logic signed [DW-1:0] round_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    localparam logic signed [PW-1:0] MAXV = (PW'(1) <<< (DW - 1)) - PW'(1);
    localparam logic signed [PW-1:0] MINV = -(PW'(1) <<< (DW - 1));
    r = (v + (PW'(1) <<< (SHR - 1))) >>> SHR;
    if (r > MAXV) return MAXV[DW-1:0];
    if (r < MINV) return MINV[DW-1:0];
    return r[DW-1:0];
  endfunction

  logic signed [DW-1:0] w_re, w_im;
  always_ff @(posedge clk) begin
    logic signed [BW-1:0]   yr, yi;
    logic signed [TW_W-1:0] wr, wi;
    logic signed [PW-1:0]   pr, pi;
    yr = y_re[pipe[5].q];
    yi = y_im[pipe[5].q];
    wr = tw_q[2*TW_W-1:TW_W];
    wi = tw_q[TW_W-1:0];
    pr = PW'(yr) * PW'(wr) - PW'(yi) * PW'(wi);
    pi = PW'(yr) * PW'(wi) + PW'(yi) * PW'(wr);
    w_re <= round_sat(pr);
    w_im <= round_sat(pi);
  end

  // ---------------------------------------------------------------- RAM write port
  logic            ld_we;
  logic            we;
  logic [AW:0]     waddr;
  logic [2*DW-1:0] wdata;
  logic [SW-1:0]   wtag;      // 0 = load, p+1 = pass p
  logic [AW-1:0]   wa;

  assign in_ready = (state == S_LOAD);
  assign ld_we    = in_valid && in_ready;

  always_comb begin
    if (ld_we) begin
      we    = 1'b1;
      wa    = cnt;
      waddr = {1'b0, cnt};
      wdata = {DW'(in_re), DW'(in_im)};
      wtag  = '0;
    end else begin
      we    = pipe[PIPE].valid;
      wa    = pipe[PIPE].addr;
      waddr = {~pipe[PIPE].pass[0], pipe[PIPE].addr};
      wdata = {w_re, w_im};
      wtag  = pipe[PIPE].pass + 1'b1;
    end
    if (fi_en && !fi_coef && wtag == fi_stage && wa == fi_addr) wdata = wdata ^ fi_mask;
  end

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;

  // last-pass writes for the checks
  assign res_valid = pipe[PIPE].valid && (pipe[PIPE].pass == m_q - 1'b1);
  assign res_last  = pipe[PIPE].valid && pipe[PIPE].last;
  assign res_re    = wdata[2*DW-1:DW];
  assign res_im    = wdata[DW-1:0];

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      pass  <= '0;
      m_q   <= SW'(LOG4N);
    end else begin
      unique case (state)
        S_LOAD: begin
          if (cnt == '0) begin
            if (cfg_stages == '0)              m_q <= SW'(1);
            else if (cfg_stages > SW'(LOG4N))  m_q <= SW'(LOG4N);
            else                               m_q <= cfg_stages;
          end
          if (ld_we) begin
            if (cnt == npts_m1) begin
              cnt   <= '0;
              pass  <= '0;
              state <= S_COMP;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_COMP: begin
          if (cnt == npts_m1) begin
            cnt <= '0;
            if (pass == m_q - 1'b1) state <= S_WAIT;
            else                    pass  <= pass + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WAIT: begin
          // the pipeline has drained once the last write has gone by
          if (unload_go && transform_done) state <= S_UNLOAD;
        end
        S_UNLOAD: begin
          if (cnt == npts_m1) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // transform_done: set by the last write, cleared when a new block loads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   transform_done <= 1'b0;
    else if (res_last)            transform_done <= 1'b1;
    else if (state == S_UNLOAD)   transform_done <= 1'b0;
  end

  // output stream, one cycle behind the unload read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= ul_valid;
      out_last  <= ul_valid && (cnt == npts_m1);
      out_idx   <= cnt;
    end
  end
  assign out_re = r_re;
  assign out_im = r_im;

  assign busy = (state != S_LOAD) || (cnt != '0);

endmodule
