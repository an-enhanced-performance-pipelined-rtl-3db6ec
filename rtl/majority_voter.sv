// Majority voter of one bus segment.
//
// Raises cnt when more than half of its W compare bits are 1, that is when
// sending the segment unchanged would toggle more than W/2 bus lines. At a tie
// (exactly W/2 ones) cnt stays 0 and the segment is sent unchanged. With the
// default W = 4 this is "at least three of four". Implemented as a population
// count against a threshold; purely combinational.
// The "more than half" rule and the 4-input size follow the published design;
// writing it as a ones count, and the tie rule, are this implementation's.
module majority_voter #(
  parameter int unsigned W = pbi_pkg::SEG_W
) (
  input  logic [W-1:0] m,    // compare bits of the segment
  output logic         cnt   // 1 = invert this segment
);
  logic [$clog2(W+1)-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < W; i++) ones = ones + m[i];
    cnt = (int'(ones) * 2 > int'(W));
  end
endmodule
