// End-to-end test of the coded link at its default size (8-bit bus, two 4-bit
// segments), with no parameter overridden.
//
// Words are sent one per cycle. For every word the test checks that the bus
// carries the reference coding, that the receiver restores the word one cycle
// after it was offered, and that no segment toggles more than half its lines.
// It counts how often each mechanism occurred -- low half inverted, high half
// inverted, both inverted, neither, a tie left uninverted, a reset in mid
// stream -- and fails if any never did. It also totals the transitions on the
// data lines for the coded link, for an uncoded bus and for a classic
// single-invert-line bus-invert code, over random data, and requires the coded
// link to beat the uncoded bus.
module pbi_top_tb;
  import pbi_ref_pkg::*;
  localparam int W = 8, SEG = 4, N_RANDOM = 100000;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, bus_data, dout;
  logic [1:0]   bus_inv;
  int checks = 0, failures = 0;

  pbi_top dut (.clk(clk), .rst_n(rst_n), .din(din),
               .bus_data(bus_data), .bus_inv(bus_inv), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (N_RANDOM + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_none = 0, n_lo = 0, n_hi = 0, n_both = 0, n_tie = 0, n_reset = 0;
  // transition totals (data lines, then invert lines)
  longint t_pbi = 0, t_pbi_inv = 0, t_raw = 0, t_bi = 0, t_bi_inv = 0;

  logic [63:0] bus_model = '0;
  logic [1:0]  inv_model = '0;
  logic [W-1:0] raw_prev = '0;
  logic [63:0] bi_bus = '0;
  logic        bi_inv = 1'b0;

  task automatic send(logic [W-1:0] word);
    logic [63:0] exp_bus, bi_next;
    logic [7:0]  exp_inv;
    logic        bi_inv_next;
    exp_bus = pbi_code(64'(word), bus_model, W, SEG, exp_inv);
    for (int k = 0; k < 2; k++)
      if (2 * hamming(64'(word) >> (4 * k) & 64'hF, bus_model >> (4 * k) & 64'hF, SEG) == SEG)
        n_tie++;
    case (exp_inv[1:0])
      2'b00: n_none++;
      2'b01: n_lo++;
      2'b10: n_hi++;
      default: n_both++;
    endcase
    @(negedge clk) din = word;
    @(posedge clk) #1;
    checks++;
    if (bus_data !== W'(exp_bus) || bus_inv !== exp_inv[1:0]) begin
      failures++;
      if (failures < 20) $display("FAIL bus: din=%h bus=%h inv=%b exp %h %b",
                                  word, bus_data, bus_inv, W'(exp_bus), exp_inv[1:0]);
    end
    checks++;
    if (dout !== word) begin
      failures++;
      if (failures < 20) $display("FAIL receive: din=%h dout=%h", word, dout);
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (2 * hamming(64'(bus_data) >> (4 * k) & 64'hF, bus_model >> (4 * k) & 64'hF, SEG) > SEG) begin
        failures++;
        $display("FAIL segment %0d toggled more than half", k);
      end
    end
    t_pbi     += longint'(hamming(64'(bus_data), bus_model, W));
    t_pbi_inv += longint'(hamming(64'(bus_inv), 64'(inv_model), 2));
    t_raw     += longint'(hamming(64'(word), 64'(raw_prev), W));
    bi_next    = bi_code(64'(word), bi_bus, bi_inv, W, bi_inv_next);
    t_bi      += longint'(hamming(bi_next, bi_bus, W));
    t_bi_inv  += (bi_inv_next != bi_inv);
    bus_model  = 64'(bus_data);
    inv_model  = bus_inv;
    raw_prev   = word;
    bi_bus     = bi_next;
    bi_inv     = bi_inv_next;
  endtask

  initial begin
    din = 8'h00;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    send(8'h00); send(8'hFF); send(8'h0F); send(8'h00); send(8'hF0); send(8'h33);
    for (int i = 0; i < N_RANDOM / 2; i++) send(W'($urandom));
    // reset in mid stream: bus and invert lines return to zero
    @(negedge clk) rst_n = 0;
    #1 checks++;
    if (bus_data !== '0 || bus_inv !== '0) begin
      failures++;
      $display("FAIL mid-stream reset: bus=%h inv=%b", bus_data, bus_inv);
    end else n_reset++;
    @(negedge clk) rst_n = 1;
    bus_model = '0; inv_model = '0;
    raw_prev = '0; bi_bus = '0; bi_inv = 1'b0;
    for (int i = 0; i < N_RANDOM / 2; i++) send(W'($urandom));

    $display("words: none=%0d low=%0d high=%0d both=%0d ties=%0d resets=%0d",
             n_none, n_lo, n_hi, n_both, n_tie, n_reset);
    $display("data-line transitions: uncoded=%0d classic_bi=%0d (+%0d invert) partitioned=%0d (+%0d invert)",
             t_raw, t_bi, t_bi_inv, t_pbi, t_pbi_inv);
    checks++;
    if (n_none == 0 || n_lo == 0 || n_hi == 0 || n_both == 0 || n_tie == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    checks++;
    if (!(t_pbi < t_raw)) begin
      failures++;
      $display("FAIL: coded bus did not reduce data-line transitions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
