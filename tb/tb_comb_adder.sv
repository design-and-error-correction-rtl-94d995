// Self-checking testbench for comb_adder: random complex samples on four
// inputs, summed over every one of the 16 possible selection masks by sixteen
// instances, compared with sums computed here.
module tb_comb_adder;
  localparam int K = 4, IN_W = 12, OUT_W = 14;
  logic signed [IN_W-1:0]  in_re [K], in_im [K];
  logic signed [OUT_W-1:0] s_re [16], s_im [16];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 16; m++) begin : g_m
    comb_adder #(.K(K), .IN_W(IN_W), .OUT_W(OUT_W), .MASK(32'(m))) dut (
      .in_re, .in_im, .sum_re(s_re[m]), .sum_im(s_im[m]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int vr [K], vi [K];
      for (int i = 0; i < K; i++) begin
        // include the extremes now and then
        vr[i] = (n % 7 == 0) ? -2048 : $signed($urandom_range(4095)) - 2048;
        vi[i] = (n % 11 == 0) ? 2047 : $signed($urandom_range(4095)) - 2048;
        in_re[i] = IN_W'(vr[i]);
        in_im[i] = IN_W'(vi[i]);
      end
      #1;
      for (int m = 0; m < 16; m++) begin
        int er, ei;
        er = 0; ei = 0;
        for (int i = 0; i < K; i++) if (m[i]) begin er += vr[i]; ei += vi[i]; end
        checks++;
        if (int'(s_re[m]) != er || int'(s_im[m]) != ei) begin
          failures++;
          $display("mask %0d: got (%0d,%0d) expected (%0d,%0d)", m, s_re[m], s_im[m], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
