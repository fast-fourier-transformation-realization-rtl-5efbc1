// da_lut_tb: reads all 16 entries of the DA lookup ROM (four twiddles times
// four bit pairs) and compares them with the products of the address bits
// with the twiddle, p_re = br*wr - bi*wi and p_im = br*wi + bi*wr, where the
// twiddles are 1.0 = 256 and 0.707 = 180 in Q8.8:
// W8^0 = 256, W8^1 = 180 - j180, W8^2 = -j256, W8^3 = -180 - j180.
module da_lut_tb;
  import fft_pkg::*;

  logic [1:0] k;
  logic [1:0] addr;
  lut_t       p_re, p_im;
  int         checks = 0, failures = 0;

  int tw_re [4] = '{256, 180, 0, -180};
  int tw_im [4] = '{0, -180, -256, -180};

  da_lut dut (.k(k), .addr(addr), .p_re(p_re), .p_im(p_im));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int br, bi, wr, wi;
    // Visit every entry twice, the second time in random order.
    for (int i = 0; i < 48; i++) begin
      int e;
      e = (i < 16) ? i : int'($urandom_range(0, 15));
      k    = 2'(e >> 2);
      addr = 2'(e & 3);
      wr = tw_re[e >> 2];
      wi = tw_im[e >> 2];
      br = (e >> 1) & 1;
      bi = e & 1;
      #1;
      checks += 2;
      if (int'(p_re) != br*wr - bi*wi) begin
        failures++;
        $display("FAIL k=%0d addr=%0d p_re=%0d expected %0d", e >> 2, e & 3, p_re, br*wr - bi*wi);
      end
      if (int'(p_im) != br*wi + bi*wr) begin
        failures++;
        $display("FAIL k=%0d addr=%0d p_im=%0d expected %0d", e >> 2, e & 3, p_im, br*wi + bi*wr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
