// Self-checking testbench for tmr_voter: random words with no, one or two
// copies corrupted. With at most one bad copy the output must equal the good
// value; the mismatch flag must be set exactly when the copies differ. The
// expected majority is computed here bit by bit.
module tb_tmr_voter;
  localparam int W = 24;
  logic [W-1:0] a, b, c, y;
  logic mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] v, e, exp_y;
      int which;
      v = W'($urandom);
      e = W'($urandom) | W'(1);
      which = n % 5;
      a = v; b = v; c = v;
      case (which)
        1: a = v ^ e;
        2: b = v ^ e;
        3: c = v ^ e;
        4: begin a = W'($urandom); b = W'($urandom); c = W'($urandom); end
        default: ;
      endcase
      #1;
      for (int i = 0; i < W; i++)
        exp_y[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      checks++;
      if (y !== exp_y || (which >= 1 && which <= 3 && y !== v)) begin
        failures++; $display("a=%h b=%h c=%h y=%h", a, b, c, y);
      end
      checks++;
      if (mismatch !== !(a == b && b == c)) begin
        failures++; $display("mismatch=%0d for a=%h b=%h c=%h", mismatch, a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
