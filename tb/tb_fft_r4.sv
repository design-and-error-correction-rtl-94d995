// Self-checking testbench for fft_r4, the iterative radix-4 FFT core.
//
// For several transform sizes (4, 16, 64, 256 and the full 1024 points) it
// streams in a block of random samples, checks that the last pass ends exactly
// m*N' + 6 cycles after the last input sample (one sample per cycle per pass,
// six cycles of pipeline), unloads the spectrum and compares every bin with a
// direct DFT computed here in floating point and scaled by 1/sqrt(N'). It also
// checks that the output energy equals the input energy (Parseval) to within
// rounding, and that a soft error injected into the stage RAM or into a
// rotation coefficient changes the output.
module tb_fft_r4;
  localparam int LOG4N = 5;
  localparam int IN_W  = 12;
  localparam int DW    = 14;
  localparam int N     = 4 ** LOG4N;
  localparam int TOL   = 10;     // allowed error per component, output LSBs

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] cfg_stages;
  logic in_valid, in_ready;
  logic signed [IN_W-1:0] in_re, in_im;
  logic res_valid, res_last;
  logic signed [DW-1:0] res_re, res_im;
  logic unload_go, transform_done, out_valid, out_last, busy;
  logic [2*LOG4N-1:0] out_idx;
  logic signed [DW-1:0] out_re, out_im;
  logic fi_en, fi_coef;
  logic [2:0] fi_stage;
  logic [2*LOG4N-1:0] fi_addr;
  logic [2*DW-1:0] fi_mask;

  fft_r4 #(.LOG4N(LOG4N), .IN_W(IN_W), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [N], xi [N];
  int yr [N], yi [N];
  longint t_last_in, t_res_last;

  // runs one block of 4^m points; returns the spectrum in yr/yi
  task automatic run_block(input int m, input int amp);
    int np = 4 ** m;
    int k = 0;
    for (int i = 0; i < np; i++) begin
      xr[i] = $signed($urandom_range(2 * amp)) - amp;
      xi[i] = $signed($urandom_range(2 * amp)) - amp;
    end
    cfg_stages = 3'(m);
    unload_go  = 0;
    @(negedge clk);
    for (int i = 0; i < np; i++) begin
      in_valid = 1; in_re = IN_W'(xr[i]); in_im = IN_W'(xi[i]);
      @(posedge clk);
      if (i == np - 1) t_last_in = cycle;
      #1;
    end
    in_valid = 0;
    // wait for the end of the last pass
    while (1) begin
      @(posedge clk);
      if (res_last) begin t_res_last = cycle; break; end
    end
    @(negedge clk);
    unload_go = 1;
    while (k < np) begin
      @(posedge clk);
      if (out_valid) begin
        if (int'(out_idx) != k) begin
          failures++; $display("output index %0d, expected %0d", out_idx, k);
        end
        yr[k] = out_re; yi[k] = out_im;
        k++;
      end
    end
    @(negedge clk);
    unload_go = 0;
  endtask

  task automatic check_block(input int m, input bit faulty);
    int np = 4 ** m;
    real pi2 = 2.0 * 3.14159265358979323846;
    real sc = 1.0 / $sqrt(real'(np));
    real ein = 0.0, eout = 0.0;
    int maxerr = 0;
    int nbad = 0;
    checks++;
    if (t_res_last - t_last_in != longint'(m * np + 6)) begin
      failures++;
      $display("m=%0d: transform took %0d cycles, expected %0d", m, t_res_last - t_last_in, m * np + 6);
    end
    for (int k = 0; k < np; k++) begin
      real sr = 0.0, si = 0.0;
      int er, ei;
      for (int n = 0; n < np; n++) begin
        real a = pi2 * real'((n * k) % np) / real'(np);
        sr += real'(xr[n]) * $cos(a) + real'(xi[n]) * $sin(a);
        si += real'(xi[n]) * $cos(a) - real'(xr[n]) * $sin(a);
      end
      er = yr[k] - int'($rtoi($floor(sr * sc + 0.5)));
      ei = yi[k] - int'($rtoi($floor(si * sc + 0.5)));
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      if (er > TOL || ei > TOL) nbad++;
      if (!faulty) checks++;
      if (!faulty && (er > TOL || ei > TOL)) begin
        failures++;
        if (failures < 10) $display("m=%0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)", m, k, yr[k], yi[k], sr * sc, si * sc);
      end
    end
    for (int n = 0; n < np; n++) begin
      ein  += real'(xr[n]) ** 2 + real'(xi[n]) ** 2;
      eout += real'(yr[n]) ** 2 + real'(yi[n]) ** 2;
    end
    if (faulty) begin
      checks++;
      if (nbad == 0) begin failures++; $display("injected error not visible in the output"); end
      $display("m=%0d with injected error: %0d bins differ", m, nbad);
      return;
    end
    checks++;
    if ((eout - ein) > 0.002 * ein || (ein - eout) > 0.002 * ein) begin
      failures++; $display("m=%0d: energy in %0.0f out %0.0f", m, ein, eout);
    end
    $display("m=%0d: %0d points, max error %0d LSB, energy in %0.0f out %0.0f", m, np, maxerr, ein, eout);
  endtask

  initial begin
    in_valid = 0; in_re = 0; in_im = 0; unload_go = 0; cfg_stages = 3'd5;
    fi_en = 0; fi_coef = 0; fi_stage = 0; fi_addr = 0; fi_mask = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_block(1, 2000); check_block(1, 1'b0);
    run_block(2, 2000); check_block(2, 1'b0);
    run_block(3, 2000); check_block(3, 1'b0);
    run_block(4, 1500); check_block(4, 1'b0);
    run_block(5, 1500); check_block(5, 1'b0);
    // a soft error in the stage RAM must show in the output
    fi_en = 1; fi_stage = 3'd2; fi_addr = 10'd37; fi_mask = {1'b0, 1'b1, 12'd0, 14'd0};
    run_block(3, 2000);
    fi_en = 0;
    check_block(3, 1'b1);
    // so must an upset in a rotation coefficient (W^0 of pass 1, re bit 12)
    fi_en = 1; fi_coef = 1; fi_stage = 3'd1; fi_addr = 10'd0; fi_mask = {14'h1000, 14'd0};
    run_block(3, 2000);
    fi_en = 0; fi_coef = 0;
    check_block(3, 1'b1);
    // and the next block is clean again
    run_block(2, 2000); check_block(2, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
