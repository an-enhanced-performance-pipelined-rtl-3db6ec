// Partitioned bus-invert coded link: encoder, bus, receiver.
//
// The pipelined encoder codes din onto the bus (bus_data plus one invert line
// per segment); the receiver restores the word from the bus. Both bus signals
// are brought out so the transitions on the wires can be observed. Data sampled
// on din at a rising clock edge is on the bus and on dout right after that edge
// (one cycle of latency, one word per cycle). rst_n is asynchronous, active low.
// The published design covers the encoder; pairing it with a receiver and
// bringing the invert lines out as ports are this implementation's choices.
module pbi_top #(
  parameter int unsigned DATA_W = pbi_pkg::DATA_W,
  parameter int unsigned SEG_W  = pbi_pkg::SEG_W,
  parameter int unsigned NSEG   = DATA_W / SEG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] din,       // word to transmit
  output logic [DATA_W-1:0] bus_data,  // coded bus lines
  output logic [NSEG-1:0]   bus_inv,   // invert lines
  output logic [DATA_W-1:0] dout       // word restored at the receiver
);
  pbi_encoder #(.DATA_W(DATA_W), .SEG_W(SEG_W), .NSEG(NSEG)) u_enc (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (din),
    .dout  (bus_data),
    .inv   (bus_inv)
  );

  pbi_decoder #(.W(DATA_W), .SEG_W(SEG_W), .NSEG(NSEG)) u_dec (
    .bus  (bus_data),
    .inv  (bus_inv),
    .data (dout)
  );
endmodule
