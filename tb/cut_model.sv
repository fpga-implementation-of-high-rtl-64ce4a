// cut_model: behavioural stand-in for the 10-input, 3-output circuit under
// test, for simulation only. It is an arbitrary small combinational function
// of the ten CUT inputs, not the circuit the generator's weights were
// derived from. STUCK_BIT/STUCK_VAL impose a stuck-at fault on one input
// (STUCK_BIT < 0: fault-free), which is how the faulty copy is made.
//   in[i] = A[i] = N1, N2, N3, N9, N10, N13, N14, N17, N18, N21
//   out   = {N22, N16, N8}
module cut_model #(
  parameter int   STUCK_BIT = -1,
  parameter logic STUCK_VAL = 1'b0
) (
  input  logic [9:0] in,
  output logic [2:0] out
);
  logic [9:0] x;
  always_comb begin
    x = in;
    for (int i = 0; i < 10; i++)
      if (i == STUCK_BIT) x[i] = STUCK_VAL;
    out[0] = (x[0] & x[1]) ^ (x[2] | x[3]);
    out[1] = !((x[4] | x[5]) & x[6]) ^ (x[1] & x[9]);
    out[2] = (x[7] ^ x[8]) | (x[3] & x[4]);
  end
endmodule
