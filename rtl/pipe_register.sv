// Pipeline register of the bus encoder.
//
// Sits between the majority voters and the output multiplexer. On every rising
// clock edge it captures the data word and the segment invert decisions (Cnt)
// that the voters formed from that word, so the multiplexer works from a stable
// pair and the compare/vote path is cut from the output path. An asynchronous
// active-low reset clears both, which leaves an all-zero word on the bus.
// Its place and contents follow the published design; the reset is this
// implementation's choice.
module pipe_register #(
  parameter int unsigned W    = pbi_pkg::DATA_W,
  parameter int unsigned NSEG = pbi_pkg::NSEG
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W-1:0]    d_in,     // data word to hold
  input  logic [NSEG-1:0] cnt_in,   // invert decision per segment
  output logic [W-1:0]    d_q,
  output logic [NSEG-1:0] cnt_q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= '0;
      cnt_q <= '0;
    end else begin
      d_q   <= d_in;
      cnt_q <= cnt_in;
    end
  end
endmodule
