// scah_ff -- single-cycle-access scan flip-flop with hold mode (SCAh-FF).
//
// A standard scan flip-flop (a D flip-flop with a di/scan multiplexer in
// front, selected by se[0]) extended by two more 2-to-1 multiplexers, both
// steered by se[1]:
//   * the scan-side multiplexer picks si when se[1] = 1 and the flip-flop's own
//     output when se[1] = 0, so a scan cycle with se[1] = 0 holds the value;
//   * the scan-out multiplexer drives so with the stored value when se[1] = 1
//     and passes si straight through when se[1] = 0.
// The resulting modes ({se[0], se[1]}):
//   11  sync write/read : do <= si at clk, so = do
//   10  hold            : do unchanged,    so = si
//   01  async read      : do <= di at clk, so = do
//   00  functional      : do <= di at clk, so = si
// so is combinational from si, se[1] and the stored value; do is the register
// output. Reset (asynchronous, active high) clears the register.
// Structure and mode table follow the source design; the reset polarity and
// value are this design's choice.
module scah_ff (
  input  logic       clk,
  input  logic       reset,
  input  logic [1:0] se,   // se[0]: global scan enable, se[1]: line select
  input  logic       di,   // functional data from the logic under test
  input  logic       si,   // scan in (scan out of the previous register)
  output logic       do_q, // register output to the logic under test ("do")
  output logic       so    // scan out
);

  logic q, scan_d, ff_d;

  // se[1]: scan input or hold
  scah_mux2 u_hold_mux (.d0(q),  .d1(si),     .sel(se[1]), .y(scan_d));
  // se[0]: functional data or scan path
  scah_mux2 u_scan_mux (.d0(di), .d1(scan_d), .sel(se[0]), .y(ff_d));
  scah_dff  u_ff       (.clk(clk), .reset(reset), .d(ff_d), .q(q));
  // se[1]: bypass or read out
  scah_mux2 u_so_mux   (.d0(si), .d1(q),      .sel(se[1]), .y(so));

  assign do_q = q;

endmodule
