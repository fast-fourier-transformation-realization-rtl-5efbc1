// da_cmul_tb: random and corner-case complex products b*W8^k. The reference
// is floor((br*wr - bi*wi) / 256) and floor((br*wi + bi*wr) / 256), wrapped
// to 16 bits, with the Q8.8 twiddles 1.0 = 256 and 0.707 = 180. Also checks that done comes exactly 16 clock edges after start and
// that a start while busy is ignored.
module da_cmul_tb;
  import fft_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0;
  cplx_t b, p;
  logic [1:0] k;
  int tw_re [4] = '{256, 180, 0, -180};
  int tw_im [4] = '{0, -180, -256, -180};
  logic  busy, done;
  int    checks = 0, failures = 0;

  da_cmul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int br, input int bi, input int kk);
    longint ere, eim;
    int     cyc, wr, wi;
    wr = tw_re[kk];
    wi = tw_im[kk];
    ere = (longint'(br) * wr - longint'(bi) * wi) >>> 8;
    eim = (longint'(br) * wi + longint'(bi) * wr) >>> 8;
    @(negedge clk);
    b.re = sample_t'(br); b.im = sample_t'(bi);
    k = 2'(kk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    // A second start during the product must not disturb it.
    b.re = ~b.re; k = ~k; start = 1;
    @(negedge clk);
    start = 0;
    cyc++;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != DATA_W) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    if (p.re != sample_t'(ere)) begin
      failures++;
      $display("FAIL re b=(%0d,%0d) k=%0d got %0d exp %0d", br, bi, kk, p.re, sample_t'(ere));
    end
    if (p.im != sample_t'(eim)) begin
      failures++;
      $display("FAIL im b=(%0d,%0d) k=%0d got %0d exp %0d", br, bi, kk, p.im, sample_t'(eim));
    end
  endtask

  initial begin
    b = '0; k = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(256, 0, 0);
    run(-256, 512, 1);
    run(32767, -32768, 2);
    run(-32768, -32768, 3);
    run(-32768, 32767, 1);
    run(-1, -1, 3);
    for (int i = 0; i < 400; i++)
      run(int'($signed(16'($urandom))), int'($signed(16'($urandom))), i % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
