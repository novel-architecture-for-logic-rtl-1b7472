// scah_decoder -- 1-out-of-N line decoder of the SCAhS.
//
// Turns the line address add into the line-select bus ls[N:1]: ls[k] = 1
// exactly when add = k and en = 1. Address 0, an address above N, or en = 0
// select no line, so at most one line select is ever high. Purely
// combinational: a new address selects its line in the same cycle.
// Inside, a plain compare per line forms the raw selects, and a bus-wide AND
// cell (scah_and_vec, "And31") gates them with en.
// The decoder's role (it drives the se[1] pins of one line) follows the source
// design. Lines numbered from 1, address 0 meaning "no line", and the enable
// input are this design's reading of it; N = 31 and a 5-bit address give the
// 992-register reference case with 32 chains.
module scah_decoder #(
  parameter int unsigned N      = scahs_pkg::SCAHS_LINES,
  parameter int unsigned ADDR_W = scahs_pkg::SCAHS_ADDR_W
) (
  input  logic [ADDR_W-1:0] add,  // line address, 0 = none
  input  logic              en,   // decoder enable
  output logic [N:1]        ls    // line selects
);

  logic [N:1] raw;

  always_comb
    for (int unsigned k = 1; k <= N; k++)
      raw[k] = (32'(add) == k);

  scah_and_vec #(.WIDTH(N)) u_and (.a(raw), .en(en), .y(ls));

  // At most one line is selected at any time.
  always_comb assert ($onehot0(ls)) else $error("scah_decoder: several lines selected");

endmodule
