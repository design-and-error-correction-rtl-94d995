// Self-checking testbench for parseval_check (default 39-bit accumulators,
// threshold 1 * 2^21). Each block streams 256 random samples on the input
// side and the same samples in another order on the output side, then a
// chosen disturbance: none, a difference just below the threshold, or just
// above it (in either direction). The sums and the verdict are computed here
// with 64-bit integers. The verdict must come one cycle after eval, and the
// accumulators must start the next block from zero.
module tb_parseval_check;
  localparam int IN_W = 14, OUT_W = 16, ACC_W = 39, NS = 256;
  localparam longint THR = longint'(1) << 21;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, eval, flag, flag_valid;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [OUT_W-1:0] out_re, out_im;
  logic [ACC_W-1:0] sos_in, sos_out;

  parseval_check dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sr [NS], si [NS];

  // kind: 0 equal, 1 just below threshold, 2 just above, 3 above with the
  // output side smaller
  task automatic run_block(input int kind);
    longint ein = 0, eout = 0, d;
    int perm [NS];
    int extra_re;
    for (int i = 0; i < NS; i++) begin
      sr[i] = $signed($urandom_range(8000)) - 4000;
      si[i] = $signed($urandom_range(8000)) - 4000;
      perm[i] = (i * 37 + 11) % NS;   // 37 is odd: a permutation of 0..255
    end
    @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      in_valid = 1; in_re = IN_W'(sr[i]); in_im = IN_W'(si[i]);
      out_valid = 1; out_re = OUT_W'(sr[perm[i]]); out_im = OUT_W'(si[perm[i]]);
      if (kind == 3 && i == 0) begin in_re = IN_W'(4000); in_im = IN_W'(4000); sr[i] = 4000; si[i] = 4000; end
      ein  += longint'(sr[i]) * sr[i] + longint'(si[i]) * si[i];
      eout += longint'(out_re) * out_re + longint'(out_im) * out_im;
      @(negedge clk);
    end
    // one more output-side sample tunes the difference
    in_valid = 0;
    d = ein - eout;
    if (kind == 1) extra_re = 1000;     // 1e6 < 2^21
    else if (kind == 2) extra_re = 1500; // 2.25e6 > 2^21
    else extra_re = 0;
    out_valid = (kind == 1 || kind == 2);
    out_re = OUT_W'(extra_re); out_im = 0;
    if (out_valid) eout += longint'(extra_re) * extra_re;
    @(negedge clk);
    out_valid = 0;
    checks++;
    if (longint'(sos_in) != ein || longint'(sos_out) != eout) begin
      failures++; $display("sums %0d %0d, expected %0d %0d", sos_in, sos_out, ein, eout);
    end
    eval = 1;
    @(negedge clk);
    eval = 0;
    d = ein - eout;
    if (d < 0) d = -d;
    checks++;
    if (!flag_valid || flag !== (d > THR)) begin
      failures++; $display("kind %0d: flag %0d valid %0d, |diff| %0d", kind, flag, flag_valid, d);
    end
    checks++;
    if (sos_in != 0 || sos_out != 0) begin failures++; $display("accumulators not cleared"); end
    @(negedge clk);
    checks++;
    if (flag_valid) begin failures++; $display("flag_valid longer than one cycle"); end
  endtask

  initial begin
    in_valid = 0; out_valid = 0; eval = 0; in_re = 0; in_im = 0; out_re = 0; out_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) run_block(n % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
