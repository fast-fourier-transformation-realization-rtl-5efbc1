// fft_stage_tb: runs the three stages of the 8-point DIT flow graph on random
// inputs and compares each with a reference written from the flow graph's
// pairings: stage 0 pairs (0,1)(2,3)(4,5)(6,7) with W8^0; stage 1 pairs
// (0,2)(1,3)(4,6)(5,7) with W8^0, W8^2, W8^0, W8^2; stage 2 pairs
// (0,4)(1,5)(2,6)(3,7) with W8^0..W8^3. Checks the DATA_W + 1 cycle latency.
module fft_stage_tb;
  import fft_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  start [3];
  logic  done  [3];
  cplx_t x [N];
  cplx_t y [3][N];
  int    checks = 0, failures = 0;

  int tw_re [4] = '{256, 180, 0, -180};
  int tw_im [4] = '{0, -180, -256, -180};
  // top index, bottom index, twiddle exponent per butterfly and stage
  int top_i [3][4] = '{'{0, 2, 4, 6}, '{0, 1, 4, 5}, '{0, 1, 2, 3}};
  int bot_i [3][4] = '{'{1, 3, 5, 7}, '{2, 3, 6, 7}, '{4, 5, 6, 7}};
  int tw_k  [3][4] = '{'{0, 0, 0, 0}, '{0, 2, 0, 2}, '{0, 1, 2, 3}};

  for (genvar s = 0; s < 3; s++) begin : g_dut
    fft_stage #(.STAGE(s)) dut (
      .clk(clk), .rst_n(rst_n), .start(start[s]), .x(x), .done(done[s]), .y(y[s]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int s);
    cplx_t  xin [N];
    int     cyc;
    longint pre, pim;
    int     t, bo, k;
    @(negedge clk);
    foreach (x[i]) x[i] = cplx_t'($urandom);
    xin = x;
    start[s] = 1;
    @(negedge clk);
    start[s] = 0;
    foreach (x[i]) x[i] = '0;
    cyc = 0;
    while (!done[s]) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != DATA_W + 1) begin failures++; $display("FAIL stage %0d latency %0d", s, cyc); end
    for (int m = 0; m < 4; m++) begin
      t  = top_i[s][m];
      bo = bot_i[s][m];
      k  = tw_k[s][m];
      pre = (longint'(xin[bo].re) * tw_re[k] - longint'(xin[bo].im) * tw_im[k]) >>> 8;
      pim = (longint'(xin[bo].re) * tw_im[k] + longint'(xin[bo].im) * tw_re[k]) >>> 8;
      checks += 4;
      if (y[s][t].re  != sample_t'(longint'(xin[t].re) + pre) ||
          y[s][t].im  != sample_t'(longint'(xin[t].im) + pim) ||
          y[s][bo].re != sample_t'(longint'(xin[t].re) - pre) ||
          y[s][bo].im != sample_t'(longint'(xin[t].im) - pim)) begin
        failures++;
        $display("FAIL stage %0d butterfly %0d", s, m);
      end
    end
  endtask

  initial begin
    foreach (x[i]) x[i] = '0;
    foreach (start[s]) start[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) run(r % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
