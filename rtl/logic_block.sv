// logic_block: turns the session number into the accumulator's per-bit set
// and reset lines.
//
// For session s and bit i it reads the weight WEIGHTS[s][i] (bist_pkg) and
// drives set/reset = 1/0 for weight 1, 0/1 for weight 0, and 0/0 for weight
// 0.5. While `active` is low every bit gets reset = 1, which clears
// register A to 0 and loads register B with 1, so that each test starts
// from a known state; a session number outside the table does the same.
// The mapping from weights to set/reset follows the design; the clearing
// input is this design's choice.
//
// Timing: combinational. Its inputs come from registers, so the outputs
// change only once after a session change or a change of `active`.
module logic_block
  import bist_pkg::*;
(
  input  logic                 active,
  input  logic [SESSION_W-1:0] session,
  output logic [N_INPUTS-1:0]  set,
  output logic [N_INPUTS-1:0]  reset
);
  localparam int unsigned N         = N_INPUTS;
  localparam int unsigned SESSIONS  = N_SESSIONS;

  always_comb begin
    set   = '0;
    reset = '1;
    if (active && (session < SESSION_W'(SESSIONS))) begin
      for (int i = 0; i < N; i++) begin
        set[i]   = (WEIGHTS[session][i] == W_ONE);
        reset[i] = (WEIGHTS[session][i] == W_ZERO);
      end
    end
  end
endmodule
