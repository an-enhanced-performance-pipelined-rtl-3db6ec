// Self-checking test of the pipelined partitioned bus-invert encoder.
//
// A new word is offered every cycle. After each rising edge the bus word and
// invert lines are compared with the reference coding of that word against
// the previous bus word; just before the edge the bus must still hold the
// previous word (one cycle of latency, one word per cycle). The run covers
// reset, a directed sequence, 20000 random words, and a repeated word.
module pbi_encoder_tb;
  import pbi_ref_pkg::*;
  localparam int W = 8, SEG = 4;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout;
  logic [1:0]   inv;
  int checks = 0, failures = 0;
  int n_inv_lo = 0, n_inv_hi = 0, n_ties = 0;

  pbi_encoder #(.DATA_W(W), .SEG_W(SEG)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .dout(dout), .inv(inv));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] bus_model = '0;

  task automatic send(logic [W-1:0] word);
    logic [63:0] exp_bus;
    logic [7:0]  exp_inv;
    exp_bus = pbi_code(64'(word), bus_model, W, SEG, exp_inv);
    for (int k = 0; k < 2; k++)
      if (2 * hamming(64'(word) >> (4 * k) & 64'hF, bus_model >> (4 * k) & 64'hF, SEG) == SEG)
        n_ties++;
    @(negedge clk) din = word;
    #1;
    checks++;  // latency: nothing changes before the edge
    if (dout !== W'(bus_model)) begin
      failures++;
      $display("FAIL early change: din=%h dout=%h", word, dout);
    end
    @(posedge clk) #1;
    checks++;
    if (dout !== W'(exp_bus) || inv !== exp_inv[1:0]) begin
      failures++;
      if (failures < 20)
        $display("FAIL din=%h prev=%h: dout=%h inv=%b exp %h %b",
                 word, W'(bus_model), dout, inv, W'(exp_bus), exp_inv[1:0]);
    end
    n_inv_lo += exp_inv[0];
    n_inv_hi += exp_inv[1];
    bus_model = exp_bus;
  endtask

  // Hand-worked expectation, independent of the reference model.
  task automatic expect_bus(logic [W-1:0] exp_bus, logic [1:0] exp_inv);
    checks++;
    if (dout !== exp_bus || inv !== exp_inv) begin
      failures++;
      $display("FAIL worked example: dout=%h inv=%b exp %h %b", dout, inv, exp_bus, exp_inv);
    end
  endtask

  // Data words of the published simulation waveform.
  logic [W-1:0] wave_seq [9] = '{8'h00, 8'h58, 8'h76, 8'h58, 8'hFF, 8'h88, 8'h00, 8'h24, 8'h56};

  initial begin
    din = 8'hFF;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (dout !== 8'h00 || inv !== 2'b00) begin
      failures++;
      $display("FAIL reset: dout=%h inv=%b", dout, inv);
    end
    @(negedge clk) rst_n = 1;
    // worked example: bus starts at 00
    send(8'h58); expect_bus(8'h58, 2'b00);
    send(8'h76); expect_bus(8'h79, 2'b01);
    send(8'h58); expect_bus(8'h58, 2'b00);
    send(8'hFF); expect_bus(8'hF0, 2'b01);
    send(8'h56); expect_bus(8'h56, 2'b00);
    // directed: full flip of both halves, ties, single-half flips
    send(8'h00); send(8'hFF); send(8'h00); send(8'h33); send(8'hCC);
    send(8'h0F); send(8'h0E); send(8'hE0);
    foreach (wave_seq[i]) send(wave_seq[i]);
    for (int i = 0; i < 20000; i++) send(W'($urandom));
    repeat (5) send(8'h5A);
    if (n_inv_lo == 0 || n_inv_hi == 0 || n_ties == 0) begin
      failures++;
      $display("FAIL coverage: lo=%0d hi=%0d ties=%0d", n_inv_lo, n_inv_hi, n_ties);
    end
    $display("inversions low=%0d high=%0d ties=%0d", n_inv_lo, n_inv_hi, n_ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
