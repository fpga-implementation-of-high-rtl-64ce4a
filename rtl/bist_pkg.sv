// bist_pkg: constants and types shared by the 3-weight BIST.
//
// The pattern generator drives a 10-input combinational circuit under test
// (CUT) whose inputs are the nets N1, N2, N3, N9, N10, N13, N14, N17, N18 and
// N21, in that order, as accumulator bits A[0] to A[9]. The CUT has three
// outputs, N8, N16 and N22. The deterministic test set T1..T6 of the circuit
// is split into three subsets, {T1,T3}, {T2,T5} and {T4,T6}, and each subset
// becomes one test session. In a session every input gets a weight: constant
// 0, constant 1, or 0.5 (pseudorandom). WEIGHTS below is that table, one row
// per session, taken from the design's weight-assignment table; it is
// exactly what the rule "1 if all tests of the subset have 1, 0 if all have
// 0, otherwise 0.5" gives for the test set.
//
// The LFSR width of 11 follows the generator's 11-bit LFSR. Its feedback
// taps (x^11 + x^2 + 1, a primitive polynomial) are this design's choice.
package bist_pkg;

  localparam int unsigned N_INPUTS   = 10;  // CUT inputs = accumulator width
  localparam int unsigned N_OUTPUTS  = 3;   // CUT outputs N8, N16, N22
  localparam int unsigned N_SESSIONS = 3;   // weight subsets
  localparam int unsigned SESSION_W  = 2;   // bits of the session number
  localparam int unsigned LFSR_WIDTH = 11;

  // Weight of one CUT input within one session.
  typedef enum logic [1:0] {
    W_ZERO = 2'd0,  // input held at logic 0: cell set=0, reset=1
    W_ONE  = 2'd1,  // input held at logic 1: cell set=1, reset=0
    W_HALF = 2'd2   // pseudorandom input:    cell set=0, reset=0
  } weight_e;

  typedef weight_e weight_row_t [N_INPUTS];

  // WEIGHTS[s][i]: weight of A[i] in session s.
  //            A[0]    A[1]    A[2]    A[3]    A[4]    A[5]    A[6]    A[7]    A[8]    A[9]
  //            N1      N2      N3      N9      N10     N13     N14     N17     N18     N21
  localparam weight_row_t WEIGHTS [N_SESSIONS] = '{
    '{W_ONE,  W_HALF, W_ONE,  W_ZERO, W_HALF, W_ONE,  W_ZERO, W_ONE,  W_ZERO, W_ZERO},  // {T1,T3}
    '{W_ZERO, W_ONE,  W_ONE,  W_HALF, W_HALF, W_ONE,  W_HALF, W_HALF, W_ONE,  W_ZERO},  // {T2,T5}
    '{W_ZERO, W_ZERO, W_ZERO, W_ONE,  W_ONE,  W_ZERO, W_ZERO, W_HALF, W_HALF, W_ZERO}   // {T4,T6}
  };

  // Feedback taps of the default LFSR: new MSB = q[0] ^ q[2].
  localparam logic [LFSR_WIDTH-1:0] LFSR_TAPS = 11'b000_0000_0101;
  localparam logic [LFSR_WIDTH-1:0] LFSR_SEED = 11'h001;

endpackage
