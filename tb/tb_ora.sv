// tb_ora: exhaustive check of the response comparator for three CUT outputs:
// mismatch must be high exactly when the two 3-bit responses differ.
module tb_ora;
  logic [2:0] good, dut_resp;
  logic       mismatch;
  int checks = 0, failures = 0;

  ora #(.M(3)) dut (.resp_good(good), .resp_dut(dut_resp), .mismatch(mismatch));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++)
      for (int d = 0; d < 8; d++) begin
        good = 3'(g); dut_resp = 3'(d);
        #1;
        checks++;
        if (mismatch != (g != d)) begin
          failures++;
          $display("FAIL good=%b dut=%b mismatch=%b", good, dut_resp, mismatch);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
