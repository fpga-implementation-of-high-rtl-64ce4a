// lfsr: Fibonacci linear feedback shift register, the pseudorandom source of
// the 3-weight pattern generator.
//
// Each enabled clock the register shifts one place towards bit 0 and the new
// bit W-1 is the XOR of the tapped bits, ^(q & TAPS). With the default
// TAPS (bits 0 and 2, polynomial x^11 + x^2 + 1) the 11-bit register runs
// through all 2047 non-zero states. Its low bits drive the D inputs of the
// accumulator's register B. The width of 11 follows the generator; the
// taps, the shift direction and the seed are this design's choices.
//
// Timing: q changes on the clock edge when en is high; rst (asynchronous,
// active high) loads SEED, which must be non-zero.
module lfsr #(
  parameter int unsigned   W    = bist_pkg::LFSR_WIDTH,
  parameter logic [W-1:0]  TAPS = bist_pkg::LFSR_TAPS,
  parameter logic [W-1:0]  SEED = bist_pkg::LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] q
);
  logic fb;

  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= SEED;
    else if (en) q <= {fb, q[W-1:1]};
  end
endmodule
