// Exhaustive test of the bitwise comparator: every pair of 8-bit words, each
// output bit checked against a direct "do the bits differ" test.
module bit_comparator_tb;
  localparam int W = 8;
  logic [W-1:0] din, dout, m;
  int checks = 0, failures = 0;

  bit_comparator #(.W(W)) dut (.din(din), .dout(dout), .m(m));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        din = W'(a); dout = W'(b);
        #1;
        for (int i = 0; i < W; i++) begin
          logic exp_bit;
          exp_bit = (((a >> i) & 1) != ((b >> i) & 1));
          checks++;
          if (m[i] !== exp_bit) begin
            failures++;
            if (failures < 10) $display("FAIL din=%h dout=%h bit %0d: m=%b", din, dout, i, m[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
