// bit_reverse_buffer_tb: loads random frames and checks that the buffer holds
// x(0), x(4), x(2), x(6), x(1), x(5), x(3), x(7) one cycle after load, and
// that it keeps that frame while load is low.
module bit_reverse_buffer_tb;
  import fft_pkg::*;

  logic  clk = 0, rst_n = 0, load = 0;
  cplx_t x [N];
  cplx_t y [N];
  cplx_t held [N];
  int    checks = 0, failures = 0;
  int    order [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  bit_reverse_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (x[i]) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 100; f++) begin
      @(negedge clk);
      foreach (x[i]) x[i] = cplx_t'($urandom);
      held = x;
      load = 1;
      @(negedge clk);
      load = 0;
      foreach (x[i]) x[i] = cplx_t'($urandom);   // changes without load
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (y[j] != held[order[j]]) begin
          failures++;
          $display("FAIL frame %0d y[%0d]", f, j);
        end
      end
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (y[j] != held[order[j]]) begin
          failures++;
          $display("FAIL hold frame %0d y[%0d]", f, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
