// fft_stage: one of the log2(N) = 3 stages of the 8-point radix-2
// decimation-in-time flow graph, built from N/2 = 4 parallel butterflies.
//
// In stage s the butterflies combine elements that are span = 2^s apart.
// Butterfly m (0..3) works on group g = m / span and position q = m % span:
// upper input i = 2*span*g + q, lower input i + span, twiddle W8^k with
// k = q * N / (2*span). So stage 0 uses W8^0 only, stage 1 uses W8^0 and
// W8^2, and stage 2 uses W8^0..W8^3. Each butterfly's twiddle index is a
// constant, so its DA lookup ROM reduces to the four entries of that twiddle.
//
// Interface: start (one cycle) makes all four butterflies latch x and run in
// lock step; done pulses DATA_W + 1 clock edges later and y holds the stage
// result (in the butterflies' output registers) until the next start
// completes. x must stay valid only on the edge that samples start.
// The pairings and twiddles are those of the standard 8-point DIT graph;
// giving every butterfly of every stage its own hardware is this
// implementation's choice.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t x [N],
  output logic  done,
  output cplx_t y [N]
);

  localparam int unsigned SPAN = 1 << STAGE;
  localparam int unsigned NBF  = N / 2;

  logic [NBF-1:0] bf_done;

  for (genvar m = 0; m < int'(NBF); m++) begin : g_bf
    localparam int unsigned G  = m / SPAN;
    localparam int unsigned Q  = m % SPAN;
    localparam int unsigned I0 = 2 * SPAN * G + Q;
    localparam int unsigned I1 = I0 + SPAN;
    localparam int unsigned K  = Q * (N / (2 * SPAN));

    butterfly u_bf (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start),
      .a     (x[I0]),
      .b     (x[I1]),
      .k     (2'(K)),
      .done  (bf_done[m]),
      .y0    (y[I0]),
      .y1    (y[I1])
    );
  end

  assign done = bf_done[0];

  // All butterflies of a stage have the same latency and run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               bf_done == '0 || bf_done == '1);

endmodule
