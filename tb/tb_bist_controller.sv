// tb_bist_controller: drives the controller with a stand-in pattern counter
// (last every 12 enabled clocks) and random comparison results, and checks
// against a reference model: run rises on the clock after start, pass/fail
// follow the previous clock's comparison while running and are never both
// high, done pulses for one clock exactly 12 clocks after the test started,
// the test restarts while start stays high and stops when it is low.
module tb_bist_controller;
  localparam int P = 12;
  logic clk = 0, rst, start, mismatch, last, run, done, pass, fail;
  int cnt;
  int checks = 0, failures = 0;

  bist_controller dut (.clk(clk), .rst(rst), .start(start), .mismatch(mismatch),
                       .last(last), .run(run), .done(done), .pass(pass), .fail(fail));

  always #5 clk = ~clk;

  // stand-in for the pattern generator's counter
  assign last = (cnt == P - 1);
  always_ff @(posedge clk or posedge rst)
    if (rst) cnt <= 0;
    else if (run) cnt <= (cnt == P - 1) ? 0 : cnt + 1;

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
    logic m_run, m_pass, m_fail, m_done;
    int since_start, dones, restarts;
    rst = 1; start = 0; mismatch = 0;
    @(negedge clk);
    rst = 0;
    m_run = 0; m_pass = 0; m_fail = 0; m_done = 0;
    since_start = 0; dones = 0; restarts = 0;
    for (int t = 0; t < 400; t++) begin
      // start: high for a while, then low, then high again
      start    = (t < 150) || (t >= 200 && t < 230) || (t >= 300);
      mismatch = 1'($urandom);
      #1;
      check("run", run, m_run);
      check("pass", pass, m_pass);
      check("fail", fail, m_fail);
      check("done", done, m_done);
      @(posedge clk);
      // reference model, evaluated with the values sampled at this edge
      m_done = 0;
      if (!m_run) begin
        if (start) begin m_run = 1; since_start = 0; end
      end else begin
        m_pass = !mismatch; m_fail = mismatch;
        since_start++;
        if (last) begin
          m_done = 1; dones++;
          if (since_start != P) begin
            checks++; failures++;
            $display("FAIL done after %0d clocks, expected %0d", since_start, P);
          end
          since_start = 0;
          if (start) restarts++;
          m_run = start;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (dones < 3 || restarts < 1) begin
      failures++;
      $display("FAIL too few completed tests (%0d) or restarts (%0d)", dones, restarts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
