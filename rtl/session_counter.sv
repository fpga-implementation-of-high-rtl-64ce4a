// session_counter: sequences the test sessions of the 3-weight generator.
//
// A pattern counter counts the clocks of one session, PATTERNS patterns per
// session, one pattern per clock (test-per-clock). When it wraps, the
// session number advances; after the last pattern of session SESSIONS-1 both
// wrap to 0. `last` is high during the final pattern of the final session.
// The block and its role (choosing the weight subset through the logic
// block) follow the design; the pattern count per session is this design's
// choice, since none is given.
//
// Timing: counters advance on the clock edge when en is high; rst is
// asynchronous and active high; session, index and last are registered or
// decoded from registers only.
module session_counter #(
  parameter int unsigned PATTERNS  = 16,
  parameter int unsigned SESSIONS  = bist_pkg::N_SESSIONS,
  parameter int unsigned SESSION_W = bist_pkg::SESSION_W,
  parameter int unsigned INDEX_W   = (PATTERNS > 1) ? $clog2(PATTERNS) : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  output logic [SESSION_W-1:0] session,
  output logic [INDEX_W-1:0]   index,
  output logic                 last
);
  logic end_of_session;

  assign end_of_session = (index == INDEX_W'(PATTERNS - 1));
  assign last           = end_of_session && (session == SESSION_W'(SESSIONS - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      index   <= '0;
      session <= '0;
    end else if (en) begin
      if (end_of_session) begin
        index   <= '0;
        session <= last ? '0 : session + 1'b1;
      end else begin
        index <= index + 1'b1;
      end
    end
  end
endmodule
