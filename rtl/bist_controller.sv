// bist_controller: starts a test, turns the analyzer's comparison into the
// pass and fail outputs and signals the end of the test with done.
//
// Two states. In IDLE the pattern generator is disabled (run = 0). A high
// `start` moves to RUN, which enables the generator, one pattern per clock.
// At every clock in RUN the comparison of the pattern just applied is
// registered: pass = 1 if the two CUTs agreed, fail = 1 if they differed.
// When the generator flags its last pattern, done is pulsed for one clock
// along with that pattern's pass/fail; the controller then stays in RUN and
// starts over if start is still high, or returns to IDLE. Lowering start
// during a test does not abort it. The inputs clk, rst, start and the
// outputs done, pass and fail, and their meaning, follow the design; the
// per-pattern pass/fail, the one-clock done pulse, the restart, and the
// run/last link with the pattern generator are this design's choices.
//
// Timing: with start seen at clock edge 0, pattern k (k = 0 .. P-1, P =
// patterns in all sessions) is compared during the following cycle and its
// pass/fail appear after edge k+1; done is high after edge P. rst is
// asynchronous and active high and clears all outputs.
module bist_controller (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic mismatch,
  input  logic last,
  output logic run,
  output logic done,
  output logic pass,
  output logic fail
);
  typedef enum logic {IDLE = 1'b0, RUN = 1'b1} state_e;

  state_e state;

  assign run = (state == RUN);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= IDLE;
      done  <= 1'b0;
      pass  <= 1'b0;
      fail  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) state <= RUN;
        RUN: begin
          pass <= !mismatch;
          fail <= mismatch;
          if (last) begin
            done  <= 1'b1;
            state <= start ? RUN : IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // pass and fail are never high together.
  a_pass_fail_excl: assert property (@(posedge clk) disable iff (rst) !(pass && fail));
endmodule
