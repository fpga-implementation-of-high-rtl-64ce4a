// tb_bist_top: end-to-end test of the BIST at its default size (10 CUT
// inputs, 3 sessions of 16 patterns, 11-bit LFSR). Two copies of a stand-in
// CUT are attached: a fault-free one and one with input N2 (A[1]) stuck at 0.
// The testbench holds start high for two complete tests in a row, drops it,
// and later starts a third test. It checks, clock by clock:
//   * the forced inputs of every pattern match the session's weights;
//   * pass/fail equal the comparison of the two CUT copies' responses to the
//     pattern of the previous clock, computed here independently;
//   * done pulses exactly 3 x 16 clocks after each test starts (one pattern
//     per clock), and the pattern returns to 0 once the test stops;
//   * each of the six deterministic tests T1..T6 is applied in the first test.
// It counts the mechanisms of the design and fails if one never happened:
// each of the three sessions, a passing and a failing comparison (fault
// detected), done, a restart with start held high, and the return to idle.
module tb_bist_top;
  localparam int P = 16, S = 3, N = 10;
  logic clk = 0, rst, start, ovf, done, pass, fail;
  logic [N-1:0] test_pattern;
  logic [2:0]   cut_out, cut_faulty_out;
  logic [1:0]   session;
  string table_txt [S] = '{"1-10-10100", "011--1--10", "0001100--0"};
  string tests [6]     = '{"1010010100", "0110010010", "1110110100",
                           "0001100110", "0111111110", "0001100000"};
  bit covered [6];
  int checks = 0, failures = 0;
  int n_session [S], n_pass, n_fail, n_done, n_restart, n_idle;

  bist_top dut (
    .clk(clk), .rst(rst), .start(start), .test_pattern(test_pattern),
    .cut_out(cut_out), .cut_faulty_out(cut_faulty_out), .session(session),
    .ovf(ovf), .done(done), .pass(pass), .fail(fail)
  );

  cut_model u_cut        (.in(test_pattern), .out(cut_out));
  cut_model #(.STUCK_BIT(1), .STUCK_VAL(1'b0)) u_cut_faulty (.in(test_pattern), .out(cut_faulty_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string as_text(logic [N-1:0] v);
    string r = "";
    for (int i = 0; i < N; i++) r = {r, v[i] ? "1" : "0"};
    return r;
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic running, exp_pass, exp_fail, was_done;
    int n, tests_done;
    rst = 1; start = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    running = 0; exp_pass = 0; exp_fail = 0; n = 0; tests_done = 0; was_done = 0;
    for (int t = 0; t < 400; t++) begin
      // two back-to-back tests, a pause, then a third test
      start = (t >= 3 && t < 60) || (t >= 200 && t < 205);
      #1;
      check("pass", pass, exp_pass);
      check("fail", fail, exp_fail);
      check("done", done, was_done);
      if (running) begin
        int s;
        string txt;
        s = n / P;
        txt = as_text(test_pattern);
        checks++;
        if (session != 2'(s)) begin failures++; $display("FAIL session %0d expected %0d", session, s); end
        if (n % P == 0) n_session[s]++;
        for (int i = 0; i < N; i++)
          if (table_txt[s][i] != "-") begin
            checks++;
            if (txt[i] != table_txt[s][i]) begin
              failures++;
              $display("FAIL pattern %s in session %0d (weights %s)", txt, s, table_txt[s]);
            end
          end
        if (tests_done == 0)
          for (int k = 0; k < 6; k++) if (txt == tests[k]) covered[k] = 1'b1;
      end else if (t > 0) begin
        checks++;
        if (test_pattern != '0) begin failures++; $display("FAIL pattern %b while idle", test_pattern); end
      end
      @(posedge clk);
      // reference for the values registered at this edge
      was_done = 0;
      if (running) begin
        exp_pass = (cut_out == cut_faulty_out);
        exp_fail = !exp_pass;
        if (exp_pass) n_pass++; else n_fail++;
        n++;
        if (n == P * S) begin
          was_done = 1; n = 0; tests_done++; n_done++;
          if (start) n_restart++;
          else begin running = 0; n_idle++; end
        end
      end else if (start) begin
        running = 1; n = 0;
      end
      @(negedge clk);
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (!covered[k]) begin failures++; $display("FAIL test T%0d never applied", k + 1); end
    end
    $display("mechanisms: sessions %0d/%0d/%0d pass %0d fail %0d done %0d restart %0d idle %0d",
             n_session[0], n_session[1], n_session[2], n_pass, n_fail, n_done, n_restart, n_idle);
    for (int s = 0; s < S; s++) begin
      checks++;
      if (n_session[s] == 0) begin failures++; $display("FAIL session %0d never entered", s); end
    end
    checks++; if (n_pass == 0)    begin failures++; $display("FAIL no passing comparison"); end
    checks++; if (n_fail == 0)    begin failures++; $display("FAIL fault never detected"); end
    checks++; if (n_done != 3)    begin failures++; $display("FAIL %0d tests completed, expected 3", n_done); end
    checks++; if (n_restart == 0) begin failures++; $display("FAIL no restart"); end
    checks++; if (n_idle == 0)    begin failures++; $display("FAIL never returned to idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
