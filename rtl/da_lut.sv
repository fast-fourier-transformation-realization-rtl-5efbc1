// da_lut: distributed-arithmetic lookup ROM for complex multiplication by
// one of the four twiddle factors W8^k = wr + j*wi, k = 0..3.
//
// The product (br + j*bi)*W has real part br*wr - bi*wi and imaginary part
// br*wi + bi*wr. Each is a sum of two products with constant coefficients, so
// for one bit position of br and bi the contribution is one of four
// precomputed values, selected by the bit pair addr = {br bit, bi bit}:
//
//   addr | p_re      | p_im
//   00   | 0         | 0
//   01   | -wi       | wr
//   10   | wr        | wi
//   11   | wr - wi   | wr + wi
//
// The ROM holds these four entry pairs for each of the four twiddles, 16
// words per part, addressed by {k, addr}. Its contents are derived from the
// twiddle_rom words: four twiddle_rom instances with constant addresses feed
// the entry adders, so synthesis folds the whole table into constants and no
// adder or multiplier remains. Entries are 18 bits wide so that the sum or
// difference of two Q8.8 parts cannot overflow.
//
// Ports: k (twiddle index), addr (bit pair) in; p_re, p_im out.
// Combinational, zero latency.
module da_lut
  import fft_pkg::*;
(
  input  logic [1:0] k,
  input  logic [1:0] addr,
  output lut_t       p_re,
  output lut_t       p_im
);

  lut_t rom_re [4][4];
  lut_t rom_im [4][4];

  for (genvar t = 0; t < 4; t++) begin : g_tw
    cplx_t w;
    lut_t  wr, wi;

    twiddle_rom u_tw (
      .k (2'(t)),
      .w (w)
    );

    assign wr = lut_t'(w.re);
    assign wi = lut_t'(w.im);

    assign rom_re[t][0] = '0;
    assign rom_im[t][0] = '0;
    assign rom_re[t][1] = -wi;
    assign rom_im[t][1] = wr;
    assign rom_re[t][2] = wr;
    assign rom_im[t][2] = wi;
    assign rom_re[t][3] = wr - wi;
    assign rom_im[t][3] = wr + wi;
  end

  assign p_re = rom_re[k][addr];
  assign p_im = rom_im[k][addr];

endmodule
