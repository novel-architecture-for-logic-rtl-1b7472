// scah_dff -- positive-edge D flip-flop with asynchronous active-high reset.
//
// q takes d on each rising clk edge; reset forces q to 0 at once and holds it
// there. This is the storage element inside the SCAh flip-flop (the "S-FF"
// core without its scan multiplexer). The reset pin follows the flip-flop
// schematic of the source design, which shows a "reset" input; that it is
// asynchronous and active high, and that it clears to 0, is this design's
// choice.
module scah_dff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or posedge reset)
    if (reset) q <= 1'b0;
    else       q <= d;

endmodule
