// butterfly_tb: random radix-2 DIT butterflies y0 = a + W*b, y1 = a - W*b
// with the four 8-point twiddles W8^k (Q8.8: 1.0 = 256, 0.707 = 180). W*b is computed as the
// floor of the exact product over 256; sums wrap at 16 bits. Checks the
// latency of DATA_W + 1 clock edges from start to done.
module butterfly_tb;
  import fft_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0;
  cplx_t a, b, y0, y1;
  logic [1:0] k;
  logic  done;
  int    checks = 0, failures = 0;

  int tw_re [4] = '{256, 180, 0, -180};
  int tw_im [4] = '{0, -180, -256, -180};

  butterfly dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ar, input int ai, input int br, input int bi, input int kk);
    longint pre, pim;
    int     cyc, wr, wi;
    wr = tw_re[kk];
    wi = tw_im[kk];
    pre = (longint'(br) * wr - longint'(bi) * wi) >>> 8;
    pim = (longint'(br) * wi + longint'(bi) * wr) >>> 8;
    @(negedge clk);
    a.re = sample_t'(ar); a.im = sample_t'(ai);
    b.re = sample_t'(br); b.im = sample_t'(bi);
    k = 2'(kk);
    start = 1;
    @(negedge clk);
    start = 0;
    a = '0; b = '0; k = ~k;   // inputs are latched at start
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 5;
    if (cyc != DATA_W + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    if (y0.re != sample_t'(longint'(ar) + pre)) begin failures++; $display("FAIL y0.re"); end
    if (y0.im != sample_t'(longint'(ai) + pim)) begin failures++; $display("FAIL y0.im"); end
    if (y1.re != sample_t'(longint'(ar) - pre)) begin failures++; $display("FAIL y1.re"); end
    if (y1.im != sample_t'(longint'(ai) - pim)) begin failures++; $display("FAIL y1.im"); end
  endtask

  initial begin
    a = '0; b = '0; k = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(256, 0, 512, -256, 0);
    run(-256, 256, 512, 0, 2);
    for (int i = 0; i < 400; i++)
      run(int'($signed(16'($urandom))), int'($signed(16'($urandom))),
          int'($signed(16'($urandom))), int'($signed(16'($urandom))), i % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
