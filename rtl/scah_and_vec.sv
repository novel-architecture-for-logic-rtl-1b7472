// scah_and_vec -- bus-wide AND with one common enable (the "And31" cell).
//
// y[i] = a[i] & en for every bit of the bus: with en = 0 the whole bus is
// forced low, with en = 1 it passes unchanged. Purely combinational.
// The source design shows this cell (And31, and a 30-bit sibling And30) only
// as a schematic and a layout: one scalar input, one bus in, one bus out and a
// row of identical gates between them. The AND function is read from the
// cell's name; its use here, gating the 31 line selects of the line decoder
// with the decoder enable, is this design's choice. WIDTH defaults to 31.
module scah_and_vec #(
  parameter int unsigned WIDTH = 31
) (
  input  logic [WIDTH-1:0] a,
  input  logic             en,
  output logic [WIDTH-1:0] y
);

  always_comb y = a & {WIDTH{en}};

endmodule
