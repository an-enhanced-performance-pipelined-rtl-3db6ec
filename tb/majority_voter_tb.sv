// Exhaustive test of the majority voter at the 4-input size of the design and
// at 8 inputs: cnt must be 1 exactly when more than half of the inputs are 1.
module majority_voter_tb;
  logic [3:0] m4;
  logic [7:0] m8;
  logic cnt4, cnt8;
  int checks = 0, failures = 0;

  majority_voter #(.W(4)) dut4 (.m(m4), .cnt(cnt4));
  majority_voter #(.W(8)) dut8 (.m(m8), .cnt(cnt8));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      automatic int ones = 0;
      m4 = 4'(v);
      for (int i = 0; i < 4; i++) ones += (v >> i) & 1;
      #1;
      checks++;
      if (cnt4 !== (ones >= 3)) begin
        failures++;
        $display("FAIL W=4 m=%b cnt=%b", m4, cnt4);
      end
    end
    for (int v = 0; v < 256; v++) begin
      automatic int ones = 0;
      m8 = 8'(v);
      for (int i = 0; i < 8; i++) ones += (v >> i) & 1;
      #1;
      checks++;
      if (cnt8 !== (ones >= 5)) begin
        failures++;
        $display("FAIL W=8 m=%b cnt=%b", m8, cnt8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
