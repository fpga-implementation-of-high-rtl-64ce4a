// tpg: accumulator-based 3-weight test pattern generator.
//
// A session counter selects one of the three weight subsets; the logic block
// decodes it into per-bit set/reset lines for the accumulator; an LFSR feeds
// the D inputs of the accumulator's register B. Cells with weight 1 or 0 are
// forced by set or reset and pass the carry through unchanged, so the free
// cells (weight 0.5) accumulate pseudorandom LFSR data and toggle
// pseudorandomly, while the forced inputs stay constant for the whole
// session. Register A is the pattern applied to the CUT, one new pattern per
// clock. This structure follows the design. The carry into the lowest cell
// (0) and the use of LFSR bits 0..N-1 for B are this design's choices.
//
// Interface: while en is low all cells are cleared (pattern = 0) and the
// counters hold. With en high the session-0 pattern appears at once (set and
// reset act asynchronously) and each clock gives the next pattern; after
// PATTERNS patterns the next session starts. `last` marks the final pattern
// of the final session; on the following clock both counters wrap to the
// first session. rst is asynchronous and active high.
module tpg
  import bist_pkg::*;
#(
  parameter int unsigned              PATTERNS  = 16,
  parameter logic [LFSR_WIDTH-1:0]    LFSR_TAP  = LFSR_TAPS,
  parameter logic [LFSR_WIDTH-1:0]    LFSR_INIT = LFSR_SEED
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  output logic [N_INPUTS-1:0]  pattern,
  output logic [SESSION_W-1:0] session,
  output logic                 last,
  output logic                 cout
);
  localparam int unsigned INDEX_W = (PATTERNS > 1) ? $clog2(PATTERNS) : 1;

  logic [INDEX_W-1:0]    index;
  logic [N_INPUTS-1:0]   set, reset, b_reg;
  logic [LFSR_WIDTH-1:0] rnd;

  session_counter #(
    .PATTERNS (PATTERNS),
    .SESSIONS (N_SESSIONS),
    .SESSION_W(SESSION_W),
    .INDEX_W  (INDEX_W)
  ) u_session_counter (
    .clk    (clk),
    .rst    (rst),
    .en     (en),
    .session(session),
    .index  (index),
    .last   (last)
  );

  logic_block u_logic_block (
    .active (en),
    .session(session),
    .set    (set),
    .reset  (reset)
  );

  lfsr #(
    .W   (LFSR_WIDTH),
    .TAPS(LFSR_TAP),
    .SEED(LFSR_INIT)
  ) u_lfsr (
    .clk(clk),
    .rst(rst),
    .en (en),
    .q  (rnd)
  );

  accumulator #(.N(N_INPUTS)) u_accumulator (
    .clk  (clk),
    .set  (set),
    .reset(reset),
    .b_in (rnd[N_INPUTS-1:0]),
    .cin  (1'b0),
    .a    (pattern),
    .b    (b_reg),
    .cout (cout)
  );
endmodule
