// scahs_pkg -- shared constants and types of the single-cycle-access scan
// structure with hold mode (SCAhS).
//
// The reference configuration holds 992 scan registers. They are arranged as
// 32 parallel scan chains of 31 registers each: 31 lines, addressed 1..31 by a
// 5-bit line address, with address 0 selecting no line. The 992 total follows
// the source description; the 32 x 31 split and the reserved address 0 are this
// design's reading of it.
//
// scah_mode_e names the four modes of one SCAh flip-flop. The two-bit code is
// {se[0], se[1]}, the order in which the mode table of the SCAh-FF lists the
// scan-enable bits.
package scahs_pkg;

  parameter int unsigned SCAHS_CHAINS = 32;  // parallel scan chains (register width of a line)
  parameter int unsigned SCAHS_LINES  = 31;  // lines, i.e. registers per chain
  parameter int unsigned SCAHS_ADDR_W = 5;   // line-address width; address 0 = no line

  typedef enum logic [1:0] {
    MODE_FUNCTIONAL = 2'b00,  // load di, so = si
    MODE_ASYNC_READ = 2'b01,  // load di, so = do  (line observed while running)
    MODE_HOLD       = 2'b10,  // keep value, so = si
    MODE_SYNC_RW    = 2'b11   // load si, so = do  (single-cycle write and read)
  } scah_mode_e;

  // Mode of a flip-flop from its scan-enable pins (se0 = global scan enable,
  // se1 = line select).
  function automatic scah_mode_e scah_mode(input logic se0, input logic se1);
    return scah_mode_e'({se0, se1});
  endfunction

endpackage
