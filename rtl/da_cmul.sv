// da_cmul: bit-serial distributed-arithmetic complex multiplier, p = b * W8^k.
//
// Instead of four real multipliers, the product is built from the da_lut
// ROM, which holds the precomputed partial sums for twiddle W8^k: each clock one bit of b.re and the same bit of b.im form a 2-bit
// address, the table returns the real and imaginary partial sums for that
// bit position, and these are added into two accumulators. Bits are taken
// most-significant first, so the accumulators are doubled before each add
// (Horner form); the first step, the two's-complement sign bit, subtracts its
// table entry instead of adding it. After DATA_W steps the accumulators hold
// the exact Q16.16 products, which are truncated (floor, arithmetic shift
// right by FRAC_W) to Q8.8 and wrapped to DATA_W bits.
//
// Interface: start (one cycle, while idle) latches b and the twiddle index k. busy is high for
// the DATA_W accumulation cycles; done pulses for one cycle with p valid
// exactly DATA_W clock edges after the edge that sampled start. p holds its
// value until the next product is finished. A start while busy is ignored.
//
// The ROM-driven, multiplier-free product follows the design; the bit-
// serial MSB-first schedule, one bit pair per clock, and floor truncation
// are choices of this implementation.
module da_cmul
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  cplx_t b,
  input  logic [1:0] k,
  output logic  busy,
  output logic  done,
  output cplx_t p
);

  localparam int unsigned CNT_W = $clog2(DATA_W);

  logic [DATA_W-1:0] sr_re, sr_im;   // operand shift registers, MSB first
  logic [1:0]        k_q;            // twiddle index
  acc_t              acc_re, acc_im;
  logic [CNT_W-1:0]  cnt;            // bit position being processed
  logic              first;          // sign-bit step

  lut_t p_re, p_im;
  acc_t nxt_re, nxt_im;

  da_lut u_lut (
    .k    (k_q),
    .addr ({sr_re[DATA_W-1], sr_im[DATA_W-1]}),
    .p_re (p_re),
    .p_im (p_im)
  );

  always_comb begin
    if (first) begin
      nxt_re = -acc_t'(p_re);
      nxt_im = -acc_t'(p_im);
    end else begin
      nxt_re = (acc_re <<< 1) + acc_t'(p_re);
      nxt_im = (acc_im <<< 1) + acc_t'(p_im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      first  <= 1'b0;
      cnt    <= '0;
      sr_re  <= '0;
      sr_im  <= '0;
      k_q    <= '0;
      acc_re <= '0;
      acc_im <= '0;
      p      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          first <= 1'b1;
          cnt   <= CNT_W'(DATA_W - 1);
          sr_re <= b.re;
          sr_im <= b.im;
          k_q   <= k;
        end
      end else begin
        acc_re <= nxt_re;
        acc_im <= nxt_im;
        sr_re  <= sr_re << 1;
        sr_im  <= sr_im << 1;
        first  <= 1'b0;
        cnt    <= cnt - 1'b1;
        if (cnt == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          p.re <= sample_t'(nxt_re >>> FRAC_W);
          p.im <= sample_t'(nxt_im >>> FRAC_W);
        end
      end
    end
  end

endmodule
