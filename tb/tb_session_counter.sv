// tb_session_counter: checks the session/pattern counter at its default of 16
// patterns per session and 3 sessions against a reference count: the
// session number after each clock, `last` exactly on pattern 15 of session
// 2, the wrap to session 0, and holding while en is low.
module tb_session_counter;
  localparam int P = 16, S = 3;
  logic clk = 0, rst, en, last;
  logic [1:0] session;
  logic [3:0] index;
  int checks = 0, failures = 0;

  session_counter dut (.clk(clk), .rst(rst), .en(en), .session(session), .index(index), .last(last));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, lasts;
    rst = 1; en = 0;
    @(negedge clk);
    rst = 0;
    n = 0; lasts = 0;
    for (int t = 0; t < 2 * P * S + 20; t++) begin
      en = (t % 11 != 5);   // a few idle clocks
      #1;
      checks++;
      if (session != 2'((n / P) % S) || index != 4'(n % P)) begin
        failures++;
        $display("FAIL n=%0d session=%0d index=%0d", n, session, index);
      end
      checks++;
      if (last != ((n % (P * S)) == P * S - 1)) begin
        failures++;
        $display("FAIL last=%b at n=%0d", last, n);
      end
      if (last && en) lasts++;
      @(negedge clk);
      if (en) n++;
    end
    checks++;
    if (lasts != 2) begin failures++; $display("FAIL lasts=%0d", lasts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
