// tb_lfsr: checks the 11-bit LFSR. After reset it must hold the seed; it must
// hold its state while en is low; each enabled clock it must shift one place
// towards bit 0 with the new top bit equal to q[0] ^ q[2]; and it must come
// back to the seed after exactly 2047 clocks (maximal length), visiting no
// state twice before that.
module tb_lfsr;
  localparam int W = 11;
  logic clk = 0, rst, en;
  logic [W-1:0] q, prev;
  bit seen [2**W];
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .rst(rst), .en(en), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    rst = 1; en = 0;
    @(negedge clk);
    rst = 0;
    checks++;
    if (q != 11'h001) begin failures++; $display("FAIL seed %h", q); end
    repeat (3) @(negedge clk);
    checks++;
    if (q != 11'h001) begin failures++; $display("FAIL moved while disabled"); end
    en = 1;
    period = 0;
    do begin
      prev = q;
      seen[q] = 1'b1;
      @(negedge clk);
      period++;
      checks++;
      if (q != {prev[0] ^ prev[2], prev[W-1:1]}) begin
        failures++;
        $display("FAIL step %h -> %h", prev, q);
      end
      if (q != 11'h001 && seen[q]) begin
        checks++; failures++;
        $display("FAIL state %h repeated early", q);
      end
    end while (q != 11'h001 && period < 5000);
    checks++;
    if (period != 2047) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
