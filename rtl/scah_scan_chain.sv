// scah_scan_chain -- one scan chain of SCAh flip-flops.
//
// LINES SCAh-FFs in series: si feeds the flip-flop of line 1, the so of line k
// feeds the si of line k+1, and the so of line LINES is the chain's so. Every
// flip-flop gets the global scan enable gse on se[0] and the select of its own
// line, ls[k], on se[1]. Because an unselected flip-flop passes si straight
// to so, the chain behaves as a wire from si to the selected register and
// from that register to so:
//   gse = 1, line k selected : register k loads si at clk, so = its value
//   gse = 1, no line         : all registers hold, so = si
//   gse = 0                  : all registers load di at clk; so shows the
//                              selected register (or si if none)
// so is combinational; writes take effect at the rising clk edge.
// The series connection and the pin assignment follow the source design's
// connectivity figure.
module scah_scan_chain #(
  parameter int unsigned LINES = scahs_pkg::SCAHS_LINES
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             gse,        // global scan enable
  input  logic [LINES:1]   ls,         // line selects
  input  logic             si,         // chain scan in
  output logic             so,         // chain scan out
  input  logic [LINES:1]   di,         // functional data, per line
  output logic [LINES:1]   do_q        // register outputs, per line
);

  logic [LINES:0] link;  // link[k] = so of line k, link[0] = si

  assign link[0] = si;

  for (genvar k = 1; k <= LINES; k++) begin : g_line
    scah_ff u_ff (
      .clk  (clk),
      .reset(reset),
      .se   ({ls[k], gse}),
      .di   (di[k]),
      .si   (link[k-1]),
      .do_q (do_q[k]),
      .so   (link[k])
    );
  end

  assign so = link[LINES];

endmodule
