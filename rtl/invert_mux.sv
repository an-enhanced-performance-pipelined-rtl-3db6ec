// Output multiplexer of the bus encoder.
//
// For each SEG_W-bit segment of the registered word it chooses between the
// segment itself and its bitwise inverse, steered by that segment's Cnt bit:
// sel[k] = 0 passes segment k, sel[k] = 1 passes its inverse. With the default
// 8-bit word, sel[0] steers bits 3:0 and sel[1] bits 7:4. Combinational.
// The true/inverted choice per half follows the published design; which select
// steers which half is read from its signal numbering.
module invert_mux #(
  parameter int unsigned W     = pbi_pkg::DATA_W,
  parameter int unsigned SEG_W = pbi_pkg::SEG_W,
  parameter int unsigned NSEG  = W / SEG_W
) (
  input  logic [W-1:0]    d,     // registered data word
  input  logic [NSEG-1:0] sel,   // registered Cnt bits
  output logic [W-1:0]    y      // word driven onto the bus
);
  always_comb begin
    for (int k = 0; k < NSEG; k++) begin
      logic [SEG_W-1:0] seg_true, seg_inv;
      seg_true = d[k*SEG_W +: SEG_W];
      seg_inv  = ~seg_true;
      y[k*SEG_W +: SEG_W] = sel[k] ? seg_inv : seg_true;
    end
  end
endmodule
