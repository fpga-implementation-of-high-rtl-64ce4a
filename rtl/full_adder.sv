// full_adder: one-bit full adder, s = a + b + cin.
//
// Purely combinational. The 3-weight scheme relies on rows 2, 3, 6 and 7 of
// the full-adder truth table: whenever b = ~a the carry output equals the
// carry input, so a cell whose register is forced to a constant still passes
// the carry along the accumulator's ripple chain unchanged.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
