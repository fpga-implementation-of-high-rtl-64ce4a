// tb_full_adder: exhaustive check of the one-bit full adder against integer
// addition, all eight input combinations, and of the carry-transparency rule
// the 3-weight cells use (b = ~a gives cout = cin).
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned sum;
      {cin, a, b} = 3'(v);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 2'(sum)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> s=%0b cout=%0b", a, b, cin, s, cout);
      end
      if (b == !a) begin
        checks++;
        if (cout != cin) begin
          failures++;
          $display("FAIL carry not transparent for a=%0b b=%0b", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
