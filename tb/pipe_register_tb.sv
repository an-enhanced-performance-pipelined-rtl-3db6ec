// Test of the pipeline register: reset clears it, each rising edge captures
// the data word and the invert decisions, and nothing changes between edges.
module pipe_register_tb;
  logic clk = 0, rst_n = 0;
  logic [7:0] d_in, d_q;
  logic [1:0] cnt_in, cnt_q;
  int checks = 0, failures = 0;

  pipe_register #(.W(8), .NSEG(2)) dut (
    .clk(clk), .rst_n(rst_n), .d_in(d_in), .cnt_in(cnt_in), .d_q(d_q), .cnt_q(cnt_q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] ed, logic [1:0] ec, string what);
    checks++;
    if (d_q !== ed || cnt_q !== ec) begin
      failures++;
      $display("FAIL %s: d_q=%h cnt_q=%b exp %h %b", what, d_q, cnt_q, ed, ec);
    end
  endtask

  initial begin
    d_in = 8'hA5; cnt_in = 2'b11;
    repeat (2) @(posedge clk);
    #1 check(8'h00, 2'b00, "in reset");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [7:0] vd;
      logic [1:0] vc;
      vd = 8'($urandom); vc = 2'($urandom);
      @(negedge clk) begin d_in = vd; cnt_in = vc; end
      @(posedge clk) #1 check(vd, vc, "capture");
      // change inputs mid-cycle: outputs must hold
      d_in = ~vd; cnt_in = ~vc;
      #2 check(vd, vc, "hold");
    end
    // asynchronous reset clears without a clock edge
    @(negedge clk) #1 rst_n = 0;
    #1 check(8'h00, 2'b00, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
