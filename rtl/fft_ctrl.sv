// fft_ctrl: sequencer of the 8-point DA FFT.
//
// On start (while idle) it loads the input buffer, then starts stage 0, waits
// for its done, starts stage 1, and so on through the last stage; when the
// last stage is done it pulses done for one cycle and returns to idle. A
// stage is started only after the previous one has written its outputs, so
// every stage reads a stable input. Starts that arrive while busy are
// ignored.
//
// Interface: start, stage_done[LOG2N] in; load, stage_start[LOG2N], busy,
// done out. load is combinational from start in the idle state; all other
// outputs are decoded from the registered state.
//
// States: IDLE -> KICK(s) -> WAIT(s) -> ... -> KICK(LOG2N-1) -> WAIT -> FIN.
// The design describes the flow graph but not its sequencing; this
// controller is an implementation choice.
module fft_ctrl
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LOG2N-1:0] stage_done,
  output logic             load,
  output logic [LOG2N-1:0] stage_start,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {IDLE, KICK, WAIT, FIN} state_e;

  localparam int unsigned SW = $clog2(LOG2N);

  state_e        state, state_n;
  logic [SW-1:0] stage, stage_n;

  always_comb begin
    state_n     = state;
    stage_n     = stage;
    load        = 1'b0;
    stage_start = '0;
    done        = 1'b0;
    unique case (state)
      IDLE: if (start) begin
        load    = 1'b1;
        stage_n = '0;
        state_n = KICK;
      end
      KICK: begin
        stage_start[stage] = 1'b1;
        state_n            = WAIT;
      end
      WAIT: if (stage_done[stage]) begin
        if (stage == SW'(LOG2N - 1)) state_n = FIN;
        else begin
          stage_n = stage + 1'b1;
          state_n = KICK;
        end
      end
      FIN: begin
        done    = 1'b1;
        state_n = IDLE;
      end
    endcase
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      stage <= '0;
    end else begin
      state <= state_n;
      stage <= stage_n;
    end
  end

  // Only the stage being waited for may report done.
  a_done_order: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state != WAIT) |-> stage_done == '0);

endmodule
