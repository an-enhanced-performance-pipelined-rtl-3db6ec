// Pipelined partitioned bus-invert encoder.
//
// Lowers the number of transitions on a data bus. The word is split into
// segments of SEG_W bits (two 4-bit halves for the default 8-bit bus). Every
// cycle the comparator marks which bits of the new word din differ from the
// word now on the bus (dout); one majority voter per segment counts the
// differing bits and asks for inversion when more than half of that segment
// would toggle. The data word and the decisions are captured in a pipeline
// register, and the output multiplexer then drives each segment true or
// inverted. dout is fed back to the comparator, so the next word is always
// judged against what the bus really carries.
//
// Timing: din is sampled at a rising clock edge; the coded word appears on
// dout, with its invert lines on inv, right after that edge (one cycle of
// latency, one word per cycle). inv[k] = 1 says segment k is inverted; a
// receiver needs it to restore the data. rst_n (asynchronous, active low)
// clears the register, so the bus reads all zeros with no segment inverted.
//
// The comparator / two voters / register / multiplexer structure and the
// strict "more than half" rule follow the published design; the invert-line
// outputs, the reset and the tie rule (no inversion at exactly half) are
// choices of this implementation.
//
// An immediate assertion checks the property the code exists for: between
// two consecutive bus words no segment toggles more than half of its lines.
module pbi_encoder #(
  parameter int unsigned DATA_W = pbi_pkg::DATA_W,
  parameter int unsigned SEG_W  = pbi_pkg::SEG_W,
  parameter int unsigned NSEG   = DATA_W / SEG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,    // data word to send
  output logic [DATA_W-1:0] dout,   // coded word on the bus
  output logic [NSEG-1:0]   inv     // invert line per segment
);
  logic [DATA_W-1:0] m;       // comparator outputs m0..m7
  logic [NSEG-1:0]   cnt;     // voter outputs Cnt(0), Cnt(1)
  logic [DATA_W-1:0] d_q;     // registered data word
  logic [NSEG-1:0]   cnt_q;   // registered decisions

  bit_comparator #(.W(DATA_W)) u_cmp (
    .din  (din),
    .dout (dout),
    .m    (m)
  );

  for (genvar k = 0; k < NSEG; k++) begin : g_voter
    majority_voter #(.W(SEG_W)) u_mv (
      .m   (m[k*SEG_W +: SEG_W]),
      .cnt (cnt[k])
    );
  end

  pipe_register #(.W(DATA_W), .NSEG(NSEG)) u_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .d_in   (din),
    .cnt_in (cnt),
    .d_q    (d_q),
    .cnt_q  (cnt_q)
  );

  invert_mux #(.W(DATA_W), .SEG_W(SEG_W), .NSEG(NSEG)) u_mux (
    .d   (d_q),
    .sel (cnt_q),
    .y   (dout)
  );

  assign inv = cnt_q;

  // Bus-invert invariant: after coding, no segment toggles more than half of
  // its lines relative to the previous bus word.
  logic [DATA_W-1:0] dout_prev;

  function automatic int unsigned max_seg_toggles(logic [DATA_W-1:0] a, logic [DATA_W-1:0] b);
    logic [DATA_W-1:0] diff;
    int unsigned worst;
    diff  = a ^ b;
    worst = 0;
    for (int k = 0; k < NSEG; k++) begin
      int unsigned n;
      n = $countones(diff[k*SEG_W +: SEG_W]);
      if (n > worst) worst = n;
    end
    return worst;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout_prev <= '0;
    end else begin
      a_half_toggles : assert (2 * max_seg_toggles(dout, dout_prev) <= SEG_W)
        else $error("a bus segment toggled more than half of its lines");
      dout_prev <= dout;
    end
  end
endmodule
