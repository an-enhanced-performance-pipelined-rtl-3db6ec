// Exhaustive test of the output multiplexer: every data word with every
// combination of the two select bits; each half must be true or inverted.
module invert_mux_tb;
  logic [7:0] d, y;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  invert_mux #(.W(8), .SEG_W(4)) dut (.d(d), .sel(sel), .y(y));

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
        logic [3:0] lo, hi;
        d = 8'(v); sel = 2'(s);
        lo = s[0] ? ~d[3:0] : d[3:0];
        hi = s[1] ? ~d[7:4] : d[7:4];
        #1;
        checks++;
        if (y !== {hi, lo}) begin
          failures++;
          if (failures < 10) $display("FAIL d=%h sel=%b y=%h exp=%h", d, sel, y, {hi, lo});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
