// Exhaustive test of the receiver: every bus word with every pair of invert
// lines, checked against the expected restored word.
module pbi_decoder_tb;
  logic [7:0] bus, data;
  logic [1:0] inv;
  int checks = 0, failures = 0;

  pbi_decoder #(.W(8), .SEG_W(4)) dut (.bus(bus), .inv(inv), .data(data));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int s = 0; s < 4; s++) begin
        logic [7:0] exp_data;
        bus = 8'(v); inv = 2'(s);
        exp_data = {s[1] ? 4'hF - bus[7:4] : bus[7:4], s[0] ? 4'hF - bus[3:0] : bus[3:0]};
        #1;
        checks++;
        if (data !== exp_data) begin
          failures++;
          if (failures < 10) $display("FAIL bus=%h inv=%b data=%h exp=%h", bus, inv, data, exp_data);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
