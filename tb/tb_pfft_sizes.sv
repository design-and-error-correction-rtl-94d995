// Testbench for larger arrays: eight and eleven parallel FFTs with
// Hamming-coded checks (four checks each), 32 FFTs with six Hamming-coded
// checks, and eight FFTs with one check per FFT. Each configuration runs in a pfft_sizes_unit:
// a clean block and a corrected soft error in every FFT. The expected
// syndromes are the R-bit values of weight two or more, counted down from
// all ones: written out here for R = 4, enumerated by a loop for R = 6.
module tb_pfft_sizes;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] COL11 [11] = '{16'b1111, 16'b1110, 16'b1101, 16'b1100, 16'b1011, 16'b1010,
                                         16'b1001, 16'b0111, 16'b0110, 16'b0101, 16'b0011};
  localparam logic [15:0] COL8 [8]   = '{16'b1111, 16'b1110, 16'b1101, 16'b1100, 16'b1011, 16'b1010,
                                         16'b1001, 16'b0111};
  localparam logic [15:0] ONEHOT8 [8] = '{16'h80, 16'h40, 16'h20, 16'h10, 16'h08, 16'h04, 16'h02, 16'h01};

  typedef logic [15:0] col32_t [32];
  function automatic col32_t cols_r6();
    col32_t c;
    int n = 0;
    for (int v = 63; v > 0 && n < 32; v--) begin
      int w = 0;
      for (int b = 0; b < 6; b++) w += (v >> b) & 1;
      if (w >= 2) begin c[n] = 16'(v); n++; end
    end
    return c;
  endfunction
  localparam col32_t COL32 = cols_r6();

  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3;

  pfft_sizes_unit #(.K(8),  .SCHEME(SCHEME_PARITY_SOS_ECC), .R(4), .EXP_COL(COL8))    u8e  (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0));
  pfft_sizes_unit #(.K(11), .SCHEME(SCHEME_PARITY_SOS_ECC), .R(4), .EXP_COL(COL11))   u11e (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  pfft_sizes_unit #(.K(8),  .SCHEME(SCHEME_PARITY_SOS),     .R(8), .EXP_COL(ONEHOT8)) u8s  (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  pfft_sizes_unit #(.K(32), .SCHEME(SCHEME_PARITY_SOS_ECC), .R(6), .EXP_COL(COL32))   u32e (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      wait (d0 && d1 && d2 && d3);
      repeat (100_000) @(posedge clk);
    join_any
    if (d0 && d1 && d2 && d3)
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    else begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    end
    $finish;
  end
endmodule
