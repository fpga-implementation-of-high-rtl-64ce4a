// tb_acc_cell: checks one accumulator cell in its three configurations.
// Forced to 1 (set) and to 0 (reset) the cell must show A = 1/B = 0 or
// A = 0/B = 1 immediately, without a clock, hold them across clocks, and pass
// cin to cout. Free (set = reset = 0) it must load B from b_d and A with
// A + B + cin each clock; a reference model of the two registers is kept in
// the testbench.
module tb_acc_cell;
  logic clk = 0, set, reset, b_d, cin, a, b, cout;
  logic ref_a, ref_b;
  int checks = 0, failures = 0;

  acc_cell dut (.clk(clk), .set(set), .reset(reset), .b_d(b_d), .cin(cin),
                .a(a), .b(b), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    set = 0; reset = 0; b_d = 0; cin = 0;
    // forced configurations, applied between clock edges
    for (int rep = 0; rep < 20; rep++) begin
      logic one;
      one = rep[0];
      @(negedge clk);
      set = one; reset = !one;
      b_d = 1'($urandom); cin = 1'($urandom);
      #1;
      check("forced A async", a, one);
      check("forced B async", b, !one);
      check("forced cout = cin", cout, cin);
      repeat (2) begin
        @(negedge clk);
        b_d = 1'($urandom); cin = 1'($urandom);
        #1;
        check("forced A held", a, one);
        check("forced B held", b, !one);
        check("forced cout = cin", cout, cin);
      end
    end
    // free configuration: start from a known forced state
    @(negedge clk);
    set = 0; reset = 1;
    @(negedge clk);
    reset = 0;
    ref_a = 0; ref_b = 1;
    for (int k = 0; k < 200; k++) begin
      b_d = 1'($urandom); cin = 1'($urandom);
      #1;
      check("free A", a, ref_a);
      check("free B", b, ref_b);
      check("free cout", cout, (ref_a & ref_b) | (cin & (ref_a ^ ref_b)));
      @(posedge clk);
      ref_a = ref_a ^ ref_b ^ cin;
      ref_b = b_d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
