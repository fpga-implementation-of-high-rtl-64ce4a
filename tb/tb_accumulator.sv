// tb_accumulator: checks the N-cell accumulator with per-bit set/reset.
// For random weight assignments it checks that forced bits read their
// constant and that the free bits, taken in order as one shorter binary
// number, behave as an ordinary accumulator: next = A_free + B_free + cin
// modulo 2^(number of free bits), where B_free is the previous clock's b_in.
// This is the property the scheme relies on: forced cells pass the carry.
module tb_accumulator;
  localparam int N = 10;
  logic clk = 0;
  logic [N-1:0] set, reset, b_in, a, b;
  logic cin, cout;
  int checks = 0, failures = 0;

  accumulator #(.N(N)) dut (.clk(clk), .set(set), .reset(reset), .b_in(b_in),
                            .cin(cin), .a(a), .b(b), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gather the bits of v where mask is 1 into a packed number, lowest first
  function automatic logic [N-1:0] gather(logic [N-1:0] v, logic [N-1:0] mask);
    logic [N-1:0] r = '0;
    int k = 0;
    for (int i = 0; i < N; i++)
      if (mask[i]) begin
        r[k] = v[i];
        k++;
      end
    return r;
  endfunction

  initial begin
    set = '0; reset = '1; b_in = '0; cin = 0;
    repeat (2) @(negedge clk);
    for (int cfg = 0; cfg < 30; cfg++) begin
      logic [N-1:0] free, ones;
      logic [N:0]   exp_a, prev_b;
      int nfree;
      // each bit: 0, 1 or free
      ones = '0; free = '0;
      for (int i = 0; i < N; i++) begin
        automatic int w = $urandom_range(2);
        if (w == 2) free[i] = 1'b1;
        else if (w == 1) ones[i] = 1'b1;
      end
      if (cfg == 0) free = '1;
      ones  = ones & ~free;
      nfree = $countones(free);
      set   = ones;
      reset = ~ones & ~free;
      #1;
      checks++;
      if ((a & ~free) != ones) begin
        failures++;
        $display("FAIL forced bits after set/reset: a=%b ones=%b free=%b", a, ones, free);
      end
      for (int t = 0; t < 40; t++) begin
        logic [N-1:0] af, bf;
        b_in = N'($urandom);
        cin  = 1'($urandom);
        #1;
        af = gather(a, free);
        bf = gather(b, free);
        exp_a = ({1'b0, af} + {1'b0, bf} + (N+1)'(cin));
        // carry out of the last free cell reaches cout
        checks++;
        if (nfree > 0 && cout != exp_a[nfree]) begin
          failures++;
          $display("FAIL cout=%b expected %b (free=%b)", cout, exp_a[nfree], free);
        end
        prev_b = {1'b0, b_in};
        @(posedge clk);
        #1;
        checks++;
        if ((a & ~free) != ones) begin
          failures++;
          $display("FAIL forced bits moved: a=%b ones=%b free=%b", a, ones, free);
        end
        if (nfree > 0) begin
          logic [N-1:0] mask;
          mask = N'((1 << nfree) - 1);
          checks++;
          if ((gather(a, free) & mask) != (exp_a[N-1:0] & mask)) begin
            failures++;
            $display("FAIL free sum: got %b expected %b (free=%b)", gather(a, free), exp_a[N-1:0] & mask, free);
          end
          checks++;
          if (gather(b, free) != gather(prev_b[N-1:0], free)) begin
            failures++;
            $display("FAIL register B did not load b_in");
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
