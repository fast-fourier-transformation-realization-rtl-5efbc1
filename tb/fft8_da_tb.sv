// fft8_da_tb: end-to-end test of the 8-point DA FFT at its default size.
//
//  1. The reference frame x = {-1, 0, 2, 0, -4, 0, 2, 0} must give
//     X = {-1, 3, -9, 3, -1, 3, -9, 3} (imaginary parts 0), i.e. integer
//     outputs rg = FF 03 F7 03 FF 03 F7 03.
//  2. Random complex frames are compared bit for bit with a fixed-point model
//     of the radix-2 DIT transform (Q8.8, twiddles 1.0 = 256 and 0.707 = 180,
//     floor-truncated products, 16-bit wrapping sums), and, when no sum
//     wraps, with a real-valued DFT within a small tolerance.
//  3. Frames with large inputs make the sums wrap; the model must still match.
//
// Every transform must finish exactly 57 clock edges after its start, and a
// start during a transform must be ignored. The test counts how often each
// mechanism was exercised: bit reversal of a frame, each of the four DA
// table addresses, the subtracted sign-bit step, twiddles W8^1 and W8^3 on
// non-zero data, starts ignored while busy, and wrapped frames; one that
// never happened counts as a failure.
module fft8_da_tb;
  import fft_pkg::*;

  localparam int LATENCY = 3 * (DATA_W + 3);

  logic    clk = 0, rst_n = 0, start = 0;
  sample_t x_re [N], x_im [N];
  sample_t X_re [N], X_im [N];
  logic [7:0] rg [N];
  logic    busy, done;
  int      checks = 0, failures = 0;

  // mechanism counters
  int n_addr [4];
  int n_sign_sub = 0, n_ignored = 0, n_wrap = 0, n_brev = 0, n_odd_tw = 0, n_frames = 0;

  fft8_da dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the DA multiplier of the W8^1 butterfly in the last stage.
  always @(posedge clk) begin
    if (dut.g_stage[2].u_stage.g_bf[1].u_bf.u_mul.busy) begin
      n_addr[dut.g_stage[2].u_stage.g_bf[1].u_bf.u_mul.u_lut.addr]++;
      if (dut.g_stage[2].u_stage.g_bf[1].u_bf.u_mul.first &&
          dut.g_stage[2].u_stage.g_bf[1].u_bf.u_mul.u_lut.addr != 2'b00)
        n_sign_sub++;
    end
  end

  // ---------------- reference model ----------------
  int tw_re [4] = '{256, 180, 0, -180};
  int tw_im [4] = '{0, -180, -256, -180};
  int brev  [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  function automatic longint wrap16(input longint v);
    return longint'(sample_t'(v));
  endfunction

  // Fixed-point DIT model; returns 1 if any sum wrapped.
  function automatic bit model(input int xr [8], input int xi [8],
                               output int yr [8], output int yi [8]);
    bit wrapped;
    longint pr, pi, s0r, s0i, s1r, s1i;
    int half, k, t, b;
    wrapped = 0;
    for (int j = 0; j < 8; j++) begin yr[j] = xr[brev[j]]; yi[j] = xi[brev[j]]; end
    for (int half_log = 0; half_log < 3; half_log++) begin
      half = 1 << half_log;
      for (int base = 0; base < 8; base += 2 * half)
        for (int q = 0; q < half; q++) begin
          t = base + q;
          b = t + half;
          k = q * (4 / half);
          pr = (longint'(yr[b]) * tw_re[k] - longint'(yi[b]) * tw_im[k]) >>> 8;
          pi = (longint'(yr[b]) * tw_im[k] + longint'(yi[b]) * tw_re[k]) >>> 8;
          if (pr != wrap16(pr) || pi != wrap16(pi)) wrapped = 1;
          s0r = longint'(yr[t]) + pr; s0i = longint'(yi[t]) + pi;
          s1r = longint'(yr[t]) - pr; s1i = longint'(yi[t]) - pi;
          if (s0r != wrap16(s0r) || s0i != wrap16(s0i) ||
              s1r != wrap16(s1r) || s1i != wrap16(s1i)) wrapped = 1;
          yr[t] = int'(wrap16(s0r)); yi[t] = int'(wrap16(s0i));
          yr[b] = int'(wrap16(s1r)); yi[b] = int'(wrap16(s1i));
        end
    end
    return wrapped;
  endfunction

  // ---------------- one transform ----------------
  task automatic run_frame(input int xr [8], input int xi [8], input bit exact_ref,
                           input int er [8]);
    int  yr [8], yi [8];
    int  cyc;
    bit  wrapped;
    real dr, di, tol, ang, sumabs;
    wrapped = model(xr, xi, yr, yi);
    if (wrapped) n_wrap++;
    for (int n = 1; n < 8; n++) if (xr[n] != xr[brev[n]] || xi[n] != xi[brev[n]]) begin
      n_brev++;
      break;
    end
    if (xr[5] != 0 || xi[5] != 0 || xr[7] != 0 || xi[7] != 0) n_odd_tw++;
    @(negedge clk);
    for (int n = 0; n < 8; n++) begin x_re[n] = sample_t'(xr[n]); x_im[n] = sample_t'(xi[n]); end
    start = 1;
    @(negedge clk);
    start = 0;
    for (int n = 0; n < 8; n++) begin x_re[n] = '0; x_im[n] = '0; end   // captured at start
    cyc = 0;
    while (!done) begin
      if (cyc == 10) begin
        start = 1;      // must be ignored
        n_ignored++;
      end else start = 0;
      @(negedge clk);
      cyc++;
    end
    start = 0;
    n_frames++;
    checks++;
    if (cyc != LATENCY) begin failures++; $display("FAIL latency %0d expected %0d", cyc, LATENCY); end
    for (int k = 0; k < 8; k++) begin
      checks += 2;
      if (int'(X_re[k]) != yr[k] || int'(X_im[k]) != yi[k]) begin
        failures++;
        $display("FAIL frame %0d X[%0d] = (%0d,%0d) expected (%0d,%0d)", n_frames, k,
                 X_re[k], X_im[k], yr[k], yi[k]);
      end
      checks++;
      if (rg[k] != X_re[k][15:8]) begin failures++; $display("FAIL rg[%0d]", k); end
      if (exact_ref) begin
        checks++;
        if (int'(X_re[k]) != er[k] * 256 || X_im[k] != 0) begin
          failures++;
          $display("FAIL reference frame X[%0d] = %0d expected %0d", k, X_re[k], er[k] * 256);
        end
      end
      if (!wrapped) begin
        // floating-point DFT, tolerance for the 0.707 ~ 0.703 twiddle and truncation
        dr = 0.0; di = 0.0; sumabs = 0.0;
        for (int n = 0; n < 8; n++) begin
          ang = -2.0 * 3.14159265358979 * real'(n * k) / 8.0;
          dr += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
          di += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
          sumabs += (xr[n] < 0 ? -xr[n] : xr[n]) + (xi[n] < 0 ? -xi[n] : xi[n]);
        end
        tol = 0.012 * sumabs + 8.0;
        checks++;
        if ((real'(X_re[k]) - dr) > tol || (dr - real'(X_re[k])) > tol ||
            (real'(X_im[k]) - di) > tol || (di - real'(X_im[k])) > tol) begin
          failures++;
          $display("FAIL DFT X[%0d] = (%0d,%0d) vs (%f,%f)", k, X_re[k], X_im[k], dr, di);
        end
      end
    end
  endtask

  initial begin
    int xr [8], xi [8], er [8];
    foreach (x_re[i]) begin x_re[i] = '0; x_im[i] = '0; end
    foreach (n_addr[i]) n_addr[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. reference frame
    xr = '{-256, 0, 512, 0, -1024, 0, 512, 0};
    xi = '{0, 0, 0, 0, 0, 0, 0, 0};
    er = '{-1, 3, -9, 3, -1, 3, -9, 3};
    run_frame(xr, xi, 1'b1, er);
    begin
      logic [7:0] exp_rg [8];
      exp_rg = '{8'hFF, 8'h03, 8'hF7, 8'h03, 8'hFF, 8'h03, 8'hF7, 8'h03};
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rg[k] != exp_rg[k]) begin failures++; $display("FAIL rg[%0d]=%h", k, rg[k]); end
      end
    end

    // 2. random frames within range (|x| < 2.0)
    for (int f = 0; f < 200; f++) begin
      for (int n = 0; n < 8; n++) begin
        xr[n] = int'($urandom_range(0, 1022)) - 511;
        xi[n] = int'($urandom_range(0, 1022)) - 511;
      end
      run_frame(xr, xi, 1'b0, er);
    end

    // 3. full-range frames: sums wrap
    for (int f = 0; f < 30; f++) begin
      for (int n = 0; n < 8; n++) begin
        xr[n] = int'($signed(16'($urandom)));
        xi[n] = int'($signed(16'($urandom)));
      end
      run_frame(xr, xi, 1'b0, er);
    end

    $display("frames=%0d bitrev=%0d addr00=%0d addr01=%0d addr10=%0d addr11=%0d sign_sub=%0d odd_twiddle=%0d ignored_start=%0d wrapped=%0d",
             n_frames, n_brev, n_addr[0], n_addr[1], n_addr[2], n_addr[3], n_sign_sub,
             n_odd_tw, n_ignored, n_wrap);
    checks += 9;
    if (n_brev == 0)     begin failures++; $display("FAIL bit reversal never exercised"); end
    for (int a = 0; a < 4; a++)
      if (n_addr[a] == 0) begin failures++; $display("FAIL DA address %0d never used", a); end
    if (n_sign_sub == 0) begin failures++; $display("FAIL sign-bit step never subtracted"); end
    if (n_odd_tw == 0)   begin failures++; $display("FAIL W8^1/W8^3 never used on data"); end
    if (n_ignored == 0)  begin failures++; $display("FAIL no start while busy"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL no wrapped frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
