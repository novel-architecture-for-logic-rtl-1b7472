// scah_mux2 -- 2-to-1 multiplexer, the selector cell of the SCAh flip-flop.
//
// y = sel ? d1 : d0, purely combinational, no timing of its own. The SCAh
// flip-flop uses three of these around a plain D flip-flop; the cell appears
// as a module of its own ("2x1 Mux") in the source design's power breakdown.
// WIDTH is this design's addition so that the cell also serves buses; the
// default of 1 is the single-bit cell.
module scah_mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d0,   // selected when sel = 0
  input  logic [WIDTH-1:0] d1,   // selected when sel = 1
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
