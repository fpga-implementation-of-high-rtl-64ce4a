// tb_logic_block: checks the set/reset decoding for the three sessions
// against the weight table written out here as text, bit A[0] first
// ('1' = held at 1, '0' = held at 0, '-' = pseudorandom), and that an
// inactive block or a session number outside the table resets every bit.
module tb_logic_block;
  logic       active;
  logic [1:0] session;
  logic [9:0] set, reset;
  string table_txt [3] = '{"1-10-10100", "011--1--10", "0001100--0"};
  int checks = 0, failures = 0;

  logic_block dut (.active(active), .session(session), .set(set), .reset(reset));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int act = 0; act < 2; act++) begin
        active = 1'(act); session = 2'(s);
        #1;
        for (int i = 0; i < 10; i++) begin
          logic es, er;
          if (act == 0 || s == 3) begin es = 0; er = 1; end
          else begin
            es = (table_txt[s][i] == "1");
            er = (table_txt[s][i] == "0");
          end
          checks++;
          if (set[i] != es || reset[i] != er) begin
            failures++;
            $display("FAIL session %0d active %0d bit %0d: set=%b reset=%b", s, act, i, set[i], reset[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
