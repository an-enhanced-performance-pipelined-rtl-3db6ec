// Receiver of the partitioned bus-invert link.
//
// Restores the data word from the bus: each SEG_W-bit segment of the bus is
// inverted where its invert line is 1 and passed unchanged where it is 0.
// Combinational, so the data is valid in the same cycle the bus is.
// Conditional inversion by the invert line is the standard bus-invert receiver;
// one line per segment matches the partitioned encoder.
module pbi_decoder #(
  parameter int unsigned W     = pbi_pkg::DATA_W,
  parameter int unsigned SEG_W = pbi_pkg::SEG_W,
  parameter int unsigned NSEG  = W / SEG_W
) (
  input  logic [W-1:0]    bus,   // coded word from the bus
  input  logic [NSEG-1:0] inv,   // invert line per segment
  output logic [W-1:0]    data   // decoded word
);
  always_comb begin
    for (int k = 0; k < NSEG; k++)
      data[k*SEG_W +: SEG_W] = bus[k*SEG_W +: SEG_W] ^ {SEG_W{inv[k]}};
  end
endmodule
