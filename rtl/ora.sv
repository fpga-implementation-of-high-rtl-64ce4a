// ora: output response analyzer.
//
// Compares, bit by bit, the responses of the fault-free CUT and of the CUT
// under test (here the copy with imposed faults) for the pattern currently
// applied, and raises mismatch when any output differs. That it compares the
// two CUTs' outputs N8, N16 and N22 follows the design; making it a
// combinational XOR/OR comparator, with the result registered in the BIST
// controller, is this design's choice.
//
// Timing: combinational.
module ora #(
  parameter int unsigned M = bist_pkg::N_OUTPUTS
) (
  input  logic [M-1:0] resp_good,
  input  logic [M-1:0] resp_dut,
  output logic         mismatch
);
  always_comb mismatch = |(resp_good ^ resp_dut);
endmodule
