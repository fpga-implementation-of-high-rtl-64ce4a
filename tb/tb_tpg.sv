// tb_tpg: runs the 3-weight pattern generator through two full test
// sequences (3 sessions x 16 patterns) and checks, pattern by pattern:
//   * the session number follows a reference count, one pattern per clock;
//   * every input with weight 0 or 1 in the current session holds that value
//     (weight table written out here as text, A[0] first);
//   * every weight-0.5 input takes both values within each session;
//   * `last` marks exactly the final pattern of the final session;
//   * all six deterministic tests T1..T6 of the 10-input CUT appear as
//     patterns (coverage of the test set the weights were derived from);
//   * with en low the pattern is cleared to 0.
module tb_tpg;
  localparam int P = 16, S = 3, N = 10;
  logic clk = 0, rst, en, last, cout;
  logic [N-1:0] pattern;
  logic [1:0]   session;
  string table_txt [S] = '{"1-10-10100", "011--1--10", "0001100--0"};
  string tests [6]     = '{"1010010100", "0110010010", "1110110100",
                           "0001100110", "0111111110", "0001100000"};
  bit covered [6];
  int checks = 0, failures = 0;

  tpg dut (.clk(clk), .rst(rst), .en(en), .pattern(pattern), .session(session),
           .last(last), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pattern as text, A[0] first, to compare with the tables
  function automatic string as_text(logic [N-1:0] v);
    string r = "";
    for (int i = 0; i < N; i++) r = {r, v[i] ? "1" : "0"};
    return r;
  endfunction

  initial begin
    int seen0 [N], seen1 [N];
    rst = 1; en = 0;
    @(negedge clk);
    rst = 0;
    #1;
    checks++;
    if (pattern != '0) begin failures++; $display("FAIL pattern not cleared while idle"); end
    en = 1;
    for (int n = 0; n < 2 * P * S; n++) begin
      int s;
      string txt;
      s = (n / P) % S;
      #1;
      txt = as_text(pattern);
      if (n % P == 0)
        for (int i = 0; i < N; i++) begin seen0[i] = 0; seen1[i] = 0; end
      checks++;
      if (session != 2'(s)) begin failures++; $display("FAIL n=%0d session=%0d", n, session); end
      for (int i = 0; i < N; i++) begin
        if (table_txt[s][i] != "-") begin
          checks++;
          if (txt[i] != table_txt[s][i]) begin
            failures++;
            $display("FAIL n=%0d session %0d pattern %s bit %0d (weights %s)", n, s, txt, i, table_txt[s]);
          end
        end
        if (pattern[i]) seen1[i]++; else seen0[i]++;
      end
      checks++;
      if (last != (n % (P * S) == P * S - 1)) begin failures++; $display("FAIL last at n=%0d", n); end
      for (int k = 0; k < 6; k++) if (txt == tests[k]) covered[k] = 1'b1;
      if (n % P == P - 1)
        for (int i = 0; i < N; i++)
          if (table_txt[s][i] == "-") begin
            checks++;
            if (seen0[i] == 0 || seen1[i] == 0) begin
              failures++;
              $display("FAIL session %0d: weight-0.5 bit %0d stuck (%0d zeros, %0d ones)", s, i, seen0[i], seen1[i]);
            end
          end
      @(negedge clk);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (!covered[k]) begin failures++; $display("FAIL test T%0d (%s) never generated", k + 1, tests[k]); end
    end
    en = 0;
    #1;
    checks++;
    if (pattern != '0) begin failures++; $display("FAIL pattern not cleared when disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
