// twiddle_rom_tb: reads all four twiddle factors W8^k and compares them with
// round(cos/sin(2*pi*k/8)) in Q8.8 as stored by the ROM: 1.0 = 256 and
// 0.707 = 180 (0.10110100b), with W8^k = cos(2*pi*k/8) - j*sin(2*pi*k/8).
module twiddle_rom_tb;
  import fft_pkg::*;

  logic [1:0] k;
  cplx_t      w;
  int         checks = 0, failures = 0;

  twiddle_rom dut (.k(k), .w(w));

  int exp_re [4] = '{256, 180, 0, -180};
  int exp_im [4] = '{0, -180, -256, -180};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      k = 2'(i);
      #1;
      checks += 2;
      if (int'(w.re) != exp_re[i]) begin
        failures++;
        $display("FAIL W8^%0d re=%0d expected %0d", i, w.re, exp_re[i]);
      end
      if (int'(w.im) != exp_im[i]) begin
        failures++;
        $display("FAIL W8^%0d im=%0d expected %0d", i, w.im, exp_im[i]);
      end
      // Magnitude close to 1 (|W|^2 within 2% of 256^2).
      checks++;
      if ((int'(w.re)*int'(w.re) + int'(w.im)*int'(w.im)) < 64225 ||
          (int'(w.re)*int'(w.re) + int'(w.im)*int'(w.im)) > 66847) begin
        failures++;
        $display("FAIL W8^%0d magnitude", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
