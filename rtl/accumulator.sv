// accumulator: N accumulator cells (registers A and B) with a ripple carry.
//
// Cell i adds A[i] + B[i] + c[i] and passes its carry to cell i+1; the carry
// into cell 0 is the cin port (tied to 0 in the pattern generator, this
// design's choice). Per-bit set/reset lines force a cell's output to 1 or 0
// while keeping its carry transparent, so the cells left free (set = reset =
// 0) form a shorter accumulator whose sum bits are the pseudorandom CUT
// inputs. b_in[i] is loaded into register B[i] on each clock edge.
//
// Timing: one accumulation per clock; a follows set/reset immediately;
// cout (carry out of cell N-1) is combinational from the registers and cin.
module accumulator #(
  parameter int unsigned N = bist_pkg::N_INPUTS
) (
  input  logic         clk,
  input  logic [N-1:0] set,
  input  logic [N-1:0] reset,
  input  logic [N-1:0] b_in,
  input  logic         cin,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;
  assign cout = c[N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    acc_cell u_cell (
      .clk  (clk),
      .set  (set[i]),
      .reset(reset[i]),
      .b_d  (b_in[i]),
      .cin  (c[i]),
      .a    (a[i]),
      .b    (b[i]),
      .cout (c[i+1])
    );
  end
endmodule
