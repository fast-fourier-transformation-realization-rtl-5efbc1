// bit_reverse_buffer: input register bank that reorders the N samples of a
// frame into bit-reversed index order.
//
// A decimation-in-time flow graph that delivers X(k) in natural order needs
// its inputs in bit-reversed order: the repeated even/odd split of x(n) puts
// sample n at position bitrev(n) (for N = 8: 0,4,2,6,1,5,3,7). The buffer
// captures all N samples on the clock edge where load is high and holds them
// at the reversed positions, y[j] = x[bitrev(j)], until the next load. The
// stage-0 butterflies read them from here. Bit-reversed input ordering is
// part of the design; capturing all eight samples in parallel is this
// implementation's choice.
//
// Interface: load, x[N] (natural order) in; y[N] out, one cycle after load.
module bit_reverse_buffer
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  cplx_t x [N],
  output cplx_t y [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N); j++) y[j] <= '0;
    end else if (load) begin
      for (int j = 0; j < int'(N); j++) y[j] <= x[bitrev(j)];
    end
  end

endmodule
