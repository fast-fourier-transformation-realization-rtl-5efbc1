// twiddle_rom: the four twiddle factors W8^k = exp(-j*2*pi*k/8), k = 0..3,
// of an 8-point radix-2 FFT.
//
// The ROM holds each factor as two 16-bit sign-magnitude Q8.8 words, one for
// the real and one for the imaginary part, with 0.707 stored as 0.10110100b
// (0.703125). It is read combinationally: k selects the pair and the words
// are converted to two's complement for the datapath. W8^4..W8^7 are never
// needed, since the DIT flow graph only uses k < N/2 (the symmetry
// W8^(k+4) = -W8^k is folded into the butterfly's subtraction).
//
// Word values and the sign-magnitude coding follow the design's twiddle
// table; W8^0 is stored as 1.0 (0x0100).
//
// Ports: k (2 bits) in, w (real/imag Q8.8) out. No clock; zero latency.
module twiddle_rom
  import fft_pkg::*;
(
  input  logic [1:0] k,
  output cplx_t      w
);

  logic [DATA_W-1:0] sm_re, sm_im;

  always_comb begin
    unique case (k)
      2'd0: begin sm_re = 16'h0100; sm_im = 16'h0000; end  //  1
      2'd1: begin sm_re = 16'h00B4; sm_im = 16'h80B4; end  //  0.707 - j0.707
      2'd2: begin sm_re = 16'h0000; sm_im = 16'h8100; end  //  0     - j
      2'd3: begin sm_re = 16'h80B4; sm_im = 16'h80B4; end  // -0.707 - j0.707
    endcase
  end

  assign w.re = sm_to_tc(sm_re);
  assign w.im = sm_to_tc(sm_im);

endmodule
