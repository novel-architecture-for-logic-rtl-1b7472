// scah_chain_group -- the register array of the SCAhS: CHAINS parallel scan
// chains sharing one set of line selects.
//
// Chain c is a scah_scan_chain with its own si[c] and so[c]. All chains share
// gse and ls, so the registers at the same depth of every chain form one
// line of CHAINS bits. Selecting line k with gse = 1 makes the group act like
// one word of a memory: so[] reads the CHAINS-bit word of line k at once
// (combinational) and the rising clk edge writes si[] into it, while every
// other line holds. With gse = 0 all registers run functionally from di and
// so[] keeps showing the selected line.
// di and do_q are indexed [chain][line]. The arrangement follows the source
// design's connectivity figure.
module scah_chain_group #(
  parameter int unsigned CHAINS = scahs_pkg::SCAHS_CHAINS,
  parameter int unsigned LINES  = scahs_pkg::SCAHS_LINES
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         gse,
  input  logic [LINES:1]               ls,
  input  logic [CHAINS-1:0]            si,
  output logic [CHAINS-1:0]            so,
  input  logic [CHAINS-1:0][LINES:1]   di,
  output logic [CHAINS-1:0][LINES:1]   do_q
);

  for (genvar c = 0; c < CHAINS; c++) begin : g_chain
    scah_scan_chain #(.LINES(LINES)) u_chain (
      .clk  (clk),
      .reset(reset),
      .gse  (gse),
      .ls   (ls),
      .si   (si[c]),
      .so   (so[c]),
      .di   (di[c]),
      .do_q (do_q[c])
    );
  end

endmodule
