// acc_cell: one cell of the weighted-pattern accumulator.
//
// The cell is a full adder and two D flip-flops with asynchronous,
// active-high set and reset. Register A holds the accumulator bit A[i], which
// is the CUT input, and feeds the adder's first operand; on a clock edge it
// loads the adder's sum. Register B holds the operand bit B[i], loaded from
// b_d (one LFSR bit) on each clock edge. The two control lines reach the two
// flip-flops crossed over: set forces A=1 and B=0, reset forces A=0 and B=1.
// Thus:
//   set=1 reset=0 : A[i] = 1, B[i] = 0   -> output held at 1, cout = cin
//   set=0 reset=1 : A[i] = 0, B[i] = 1   -> output held at 0, cout = cin
//   set=0 reset=0 : A[i] <= A[i] + B[i] + cin each clock (pseudorandom)
// The structure, the crossed set/reset wiring and the three configurations
// follow the design. Each flip-flop gives priority to its own R input, so
// if both lines were high (the logic block never does this) A and B would
// both read 0; that priority is this design's choice.
//
// Each flip-flop has two asynchronous controls, as the cell requires; a
// synthesis flow must map them to a flip-flop with both asynchronous preset
// and clear (FPGA and standard-cell libraries have one), and some front ends
// that accept only one asynchronous control per register reject this cell.
//
// Timing: a and b change on the clock edge or as soon as set/reset rise;
// cout is combinational from a, b and cin.
module acc_cell (
  input  logic clk,
  input  logic set,
  input  logic reset,
  input  logic b_d,
  input  logic cin,
  output logic a,
  output logic b,
  output logic cout
);
  logic s;

  full_adder u_fa (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  // Register A: S <- set, R <- reset.
  always_ff @(posedge clk or posedge set or posedge reset) begin
    if (reset)    a <= 1'b0;
    else if (set) a <= 1'b1;
    else          a <= s;
  end

  // Register B: S <- reset, R <- set.
  always_ff @(posedge clk or posedge set or posedge reset) begin
    if (set)        b <= 1'b0;
    else if (reset) b <= 1'b1;
    else            b <= b_d;
  end
endmodule
