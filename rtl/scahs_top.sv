// scahs_top -- single-cycle-access scan structure with hold mode (SCAhS).
//
// The scan registers of a design are organised like a small memory: CHAINS
// parallel scan chains of LINES SCAh flip-flops each (992 registers by
// default, 32 x 31). A 1-out-of-N decoder turns the line address add into the
// line selects; the global scan enable gse goes to every register. Instead of
// shifting a pattern through a whole chain, a tester addresses one line and
// writes or reads all CHAINS registers of it in a single clock cycle, while
// every other register holds its value:
//   gse=1, add=k, en=1 : so[] = line k (combinational), line k <= si[] at clk,
//                        all other lines hold  (sync write/read)
//   gse=1, no line     : every register holds, so[] = si[]
//   gse=0, add=k, en=1 : all registers load func_d[] (functional clock), and
//                        so[] shows line k continuously (async read, for
//                        at-speed observation of one register line)
//   gse=0, no line     : plain functional operation, so[] = si[]
// The logic under test is outside this module: func_q[c][k] is the register
// output it reads and func_d[c][k] the next-state value it returns. reset
// (asynchronous, active high) clears every register.
// The register array, the decoder and their connection follow the source
// design; the decoder enable, the reserved address 0, reset and the default
// 32 x 31 split of the 992 registers are this design's choices.
module scahs_top #(
  parameter int unsigned CHAINS = scahs_pkg::SCAHS_CHAINS,
  parameter int unsigned LINES  = scahs_pkg::SCAHS_LINES,
  parameter int unsigned ADDR_W = scahs_pkg::SCAHS_ADDR_W
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         gse,     // global scan enable
  input  logic                         en,      // line decoder enable
  input  logic [ADDR_W-1:0]            add,     // line address, 0 = no line
  input  logic [CHAINS-1:0]            si,      // scan in, one per chain
  output logic [CHAINS-1:0]            so,      // scan out, one per chain
  input  logic [CHAINS-1:0][LINES:1]   func_d,  // from the logic under test
  output logic [CHAINS-1:0][LINES:1]   func_q   // to the logic under test
);

  logic [LINES:1] ls;

  initial assert ((LINES + 1) <= (1 << ADDR_W))
    else $fatal(1, "scahs_top: ADDR_W too small for LINES");

  scah_decoder #(.N(LINES), .ADDR_W(ADDR_W)) u_dec (
    .add(add), .en(en), .ls(ls)
  );

  scah_chain_group #(.CHAINS(CHAINS), .LINES(LINES)) u_group (
    .clk  (clk),
    .reset(reset),
    .gse  (gse),
    .ls   (ls),
    .si   (si),
    .so   (so),
    .di   (func_d),
    .do_q (func_q)
  );

endmodule
