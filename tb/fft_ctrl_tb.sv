// fft_ctrl_tb: drives the controller with stage models that answer each
// stage_start with a done pulse after a random delay. Checks that load comes
// with an accepted start, that stages are started once each and in order,
// that done follows the last stage's done by two cycles, that busy covers the
// whole transform, and that starts during a transform are ignored.
module fft_ctrl_tb;
  import fft_pkg::*;

  logic             clk = 0, rst_n = 0, start = 0;
  logic [LOG2N-1:0] stage_done, stage_start;
  logic             load, busy, done;
  int               checks = 0, failures = 0;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;

  // Stage models: done pulse a random 1..20 cycles after start.
  int delay [LOG2N];
  logic [LOG2N-1:0] pending;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage_done <= '0;
      pending    <= '0;
    end else for (int s = 0; s < int'(LOG2N); s++) begin
      stage_done[s] <= 1'b0;
      if (stage_start[s]) begin
        pending[s] <= 1'b1;
        delay[s]   <= int'($urandom_range(0, 19));
      end else if (pending[s]) begin
        if (delay[s] == 0) begin
          pending[s]    <= 1'b0;
          stage_done[s] <= 1'b1;
        end else delay[s] <= delay[s] - 1;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next_stage, last_done_cyc, cyc, loads;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy while idle"); end
      start = 1;
      #1;
      checks++;
      if (!load) begin failures++; $display("FAIL no load on start"); end
      @(negedge clk);
      next_stage = 0;
      loads = 0;
      cyc = 0;
      last_done_cyc = -100;
      while (!done) begin
        start = ($urandom_range(0, 3) == 0);  // ignored while busy
        #1;
        if (load) loads++;
        checks++;
        if (!busy) begin failures++; $display("FAIL not busy mid-transform"); end
        if (stage_start != '0) begin
          checks++;
          if (stage_start != (LOG2N'(1) << next_stage)) begin
            failures++;
            $display("FAIL stage_start %b expected stage %0d", stage_start, next_stage);
          end
          next_stage++;
        end
        if (stage_done[LOG2N-1]) last_done_cyc = cyc;
        @(negedge clk);
        cyc++;
      end
      start = 0;
      checks += 3;
      if (next_stage != int'(LOG2N)) begin failures++; $display("FAIL %0d stages started", next_stage); end
      if (cyc - last_done_cyc != 1) begin failures++; $display("FAIL done timing %0d", cyc - last_done_cyc); end
      if (loads != 0) begin failures++; $display("FAIL load while busy"); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
