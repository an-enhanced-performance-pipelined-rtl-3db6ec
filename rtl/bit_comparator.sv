// Bitwise comparator of the bus encoder.
//
// Compares the incoming data word with the word currently driven on the bus,
// bit by bit: m[i] is 1 where din[i] and dout[i] differ. The number of ones
// in a group of m bits is the Hamming distance the majority voters judge.
// Purely combinational; no clock. Width is a parameter (8 by default).
// The bit-for-bit comparison of the new word with the fed-back bus word is the
// published design; marking a difference with 1 is this implementation's reading.
module bit_comparator #(
  parameter int unsigned W = pbi_pkg::DATA_W
) (
  input  logic [W-1:0] din,   // next data word
  input  logic [W-1:0] dout,  // word now on the bus
  output logic [W-1:0] m      // 1 = bit would toggle if sent uninverted
);
  always_comb m = din ^ dout;
endmodule
