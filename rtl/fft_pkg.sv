// fft_pkg: types and constants shared by the 8-point distributed-arithmetic FFT.
//
// Samples are 16-bit fixed-point numbers in Q8.8 form: 8 integer bits (sign
// included) and 8 fraction bits, which is the <8,8> format the design is built
// around. Inside the datapath they are two's complement; the twiddle ROM keeps
// its words in sign-magnitude form and converts them with sm_to_tc() below.
// A complex sample is a packed struct of a real and an imaginary part.
package fft_pkg;

  localparam int unsigned DATA_W = 16;  // bits per real or imaginary part
  localparam int unsigned FRAC_W = 8;   // fraction bits of Q8.8
  localparam int unsigned N      = 8;   // transform length
  localparam int unsigned LOG2N  = 3;   // number of butterfly stages

  // Width of one DA lookup-table entry: the sum of two Q8.8 twiddle parts.
  localparam int unsigned LUT_W  = DATA_W + 2;
  // Accumulator of the bit-serial DA multiplier: a full-precision product
  // of a 16-bit operand and an 18-bit table entry.
  localparam int unsigned ACC_W  = DATA_W + LUT_W;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [LUT_W-1:0]  lut_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Sign-magnitude word (bit 15 = sign, bits 14:0 = magnitude) to two's complement.
  function automatic sample_t sm_to_tc(input logic [DATA_W-1:0] sm);
    sample_t mag;
    mag = sample_t'({1'b0, sm[DATA_W-2:0]});
    return sm[DATA_W-1] ? -mag : mag;
  endfunction

  // Reverse the LOG2N low bits of an index.
  function automatic int unsigned bitrev(input int unsigned i);
    int unsigned r;
    r = 0;
    for (int b = 0; b < int'(LOG2N); b++) r |= ((i >> b) & 1) << (LOG2N - 1 - b);
    return r;
  endfunction

endpackage
