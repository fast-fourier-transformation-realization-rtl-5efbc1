// butterfly: radix-2 decimation-in-time butterfly of the DA FFT.
//
//   y0 = a + W*b        y1 = a - W*b,   W = W8^k
//
// The twiddle product W*b comes from a da_cmul distributed-arithmetic
// multiplier, whose lookup ROM is selected by the twiddle index k; the two outputs then take one complex adder and one complex
// subtractor (four real adders). Sums wrap at DATA_W bits: no scaling is
// applied between stages, so inputs must be small enough for the transform's
// growth (at most N times the largest input) to stay within Q8.8.
//
// Interface: start (one cycle) latches a, b and k. done pulses for one cycle,
// with y0/y1 valid and held until the next butterfly finishes, DATA_W + 1
// clock edges after the edge that sampled start.
module butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t a,
  input  cplx_t b,
  input  logic [1:0] k,
  output logic  done,
  output cplx_t y0,
  output cplx_t y1
);

  cplx_t a_q, wb;
  logic  mul_busy, mul_done;

  da_cmul u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .b     (b),
    .k     (k),
    .busy  (mul_busy),
    .done  (mul_done),
    .p     (wb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      y0   <= '0;
      y1   <= '0;
      done <= 1'b0;
    end else begin
      done <= mul_done;
      if (start && !mul_busy) a_q <= a;
      if (mul_done) begin
        y0.re <= a_q.re + wb.re;
        y0.im <= a_q.im + wb.im;
        y1.re <= a_q.re - wb.re;
        y1.im <= a_q.im - wb.im;
      end
    end
  end

endmodule
