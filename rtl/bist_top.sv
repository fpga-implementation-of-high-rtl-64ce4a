// bist_top: built-in self test with an accumulator-based 3-weight test
// pattern generator.
//
// The generator (tpg) applies pseudorandom patterns, biased to the weights
// 0, 1 and 0.5 of three test sessions, to two copies of a 10-input, 3-output
// circuit under test: a fault-free one and one with imposed faults. The
// output response analyzer (ora) compares their outputs N8, N16 and N22 for
// every pattern, and the BIST controller reports pass or fail per pattern
// and done when every pattern of every session has been applied. The two
// CUTs are outside this module: test_pattern drives both, and their
// responses come back on cut_out and cut_faulty_out. This arrangement
// follows the design; that the controller starts and stops the generator
// (run) and learns the end of a test from it (last) is this design's choice.
//
// test_pattern bit i is accumulator bit A[i]; the CUT nets are, for i = 0 to
// 9: N1, N2, N3, N9, N10, N13, N14, N17, N18, N21. Response bit 0/1/2 is
// N8/N16/N22.
//
// Timing: one pattern per clock. With start high at clock edge 0, the
// patterns of session 0 appear at once, PATTERNS patterns per session, 3
// sessions; done pulses after edge 3*PATTERNS. Between tests the pattern is
// 0. ovf is the accumulator's carry out.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned PATTERNS = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  output logic [N_INPUTS-1:0]  test_pattern,
  input  logic [N_OUTPUTS-1:0] cut_out,
  input  logic [N_OUTPUTS-1:0] cut_faulty_out,
  output logic [SESSION_W-1:0] session,
  output logic                 ovf,
  output logic                 done,
  output logic                 pass,
  output logic                 fail
);
  logic run, last, mismatch;

  tpg #(.PATTERNS(PATTERNS)) u_tpg (
    .clk    (clk),
    .rst    (rst),
    .en     (run),
    .pattern(test_pattern),
    .session(session),
    .last   (last),
    .cout   (ovf)
  );

  ora #(.M(N_OUTPUTS)) u_ora (
    .resp_good(cut_out),
    .resp_dut (cut_faulty_out),
    .mismatch (mismatch)
  );

  bist_controller u_bist_controller (
    .clk     (clk),
    .rst     (rst),
    .start   (start),
    .mismatch(mismatch),
    .last    (last),
    .run     (run),
    .done    (done),
    .pass    (pass),
    .fail    (fail)
  );
endmodule
