// fft8_da: 8-point radix-2 decimation-in-time FFT whose twiddle
// multiplications are all done by distributed arithmetic.
//
// Datapath: the eight complex Q8.8 input samples are captured into a
// bit_reverse_buffer, then pass through three fft_stage blocks of four
// butterflies each (the 8-point DIT flow graph, 12 butterflies in all). Every
// butterfly forms W*b with a bit-serial DA multiplier (table lookup and
// shift-add, no multiplier) and then a +/- W*b. The result X(0..7) appears in
// natural order in the last stage's output registers. rg[k] is the integer
// part of X_re[k] (its upper 8 bits), a convenient 8-bit view of the result.
//
// Timing: start is sampled while idle (busy low) and x_re/x_im are captured
// on that same edge. Each stage takes DATA_W + 1 cycles, plus one cycle to
// be started and one for the controller to see its done, so done pulses LATENCY = 3*(DATA_W + 3) = 57 clock edges after
// the edge that sampled start; X_re, X_im and rg stay valid until the next
// transform finishes. One transform is in flight at a time.
//
// Numbers are two's complement Q8.8 with no scaling between stages; the
// sums wrap at 16 bits, so inputs should stay below 16/N = 2.0 in magnitude
// for an unwrapped result. The flow graph, the DA butterflies, Q8.8 and the
// 16-bit samples follow the design; sequencing, handshake and truncation are
// this implementation's choices.
module fft8_da
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  sample_t          x_re [N],
  input  sample_t          x_im [N],
  output logic             busy,
  output logic             done,
  output sample_t          X_re [N],
  output sample_t          X_im [N],
  output logic [DATA_W-FRAC_W-1:0] rg [N]
);

  cplx_t            x_c [N];
  cplx_t            s_in [LOG2N+1][N];   // s_in[0]: reordered input, s_in[s+1]: stage s output
  logic             load;
  logic [LOG2N-1:0] st_start, st_done;

  for (genvar i = 0; i < int'(N); i++) begin : g_in
    assign x_c[i].re = x_re[i];
    assign x_c[i].im = x_im[i];
  end

  fft_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .stage_done  (st_done),
    .load        (load),
    .stage_start (st_start),
    .busy        (busy),
    .done        (done)
  );

  bit_reverse_buffer u_brev (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .x     (x_c),
    .y     (s_in[0])
  );

  for (genvar s = 0; s < int'(LOG2N); s++) begin : g_stage
    fft_stage #(.STAGE(s)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .start (st_start[s]),
      .x     (s_in[s]),
      .done  (st_done[s]),
      .y     (s_in[s+1])
    );
  end

  for (genvar k = 0; k < int'(N); k++) begin : g_out
    assign X_re[k] = s_in[LOG2N][k].re;
    assign X_im[k] = s_in[LOG2N][k].im;
    assign rg[k]   = s_in[LOG2N][k].re[DATA_W-1:FRAC_W];
  end

endmodule
