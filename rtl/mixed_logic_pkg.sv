// Shared constants of the mixed-logic line decoders.
//
// The decoders are built from four 3-transistor gates (TGL AND/OR, DVL AND/OR),
// static CMOS inverters and static CMOS 2-input NOR/NAND gates. Every module
// carries its transistor count as a localparam, summed from the constants
// below, so that a testbench can check the topology against the published
// counts (14 and 15 for the 2-4 decoders, 92 and 94 for the 4-16 decoders).
// The per-gate nMOS/pMOS split of the 3-transistor gates is derived from the
// published 9 nMOS / 5 pMOS split of the 14-transistor non-inverting decoder
// (and its dual for the inverting one).
package mixed_logic_pkg;

  // 3-transistor mixed-logic gates
  localparam int unsigned TGL_T      = 3;
  localparam int unsigned DVL_T      = 3;
  // AND gates: 2 nMOS + 1 pMOS; OR gates are the duals: 1 nMOS + 2 pMOS
  localparam int unsigned AND3T_N    = 2;
  localparam int unsigned AND3T_P    = 1;
  localparam int unsigned OR3T_N     = 1;
  localparam int unsigned OR3T_P     = 2;

  // static CMOS gates
  localparam int unsigned INV_T      = 2;   // 1 nMOS + 1 pMOS
  localparam int unsigned NOR2_T     = 4;   // 2 nMOS + 2 pMOS
  localparam int unsigned NAND2_T    = 4;   // 2 nMOS + 2 pMOS

  // post-decoder of a 4-16 decoder: 16 two-input gates
  localparam int unsigned POSTDEC_GATES = 16;
  localparam int unsigned POSTDEC_T     = POSTDEC_GATES * NOR2_T;

  // 2-4 topologies: one inverter plus four gates
  localparam int unsigned DEC24_LP_T  = INV_T + 2 * DVL_T + 2 * TGL_T;   // 14
  localparam int unsigned DEC24_LPI_T = INV_T + 2 * DVL_T + 2 * TGL_T;   // 14
  localparam int unsigned DEC24_HP_T  = INV_T + NOR2_T  + DVL_T + 2 * TGL_T; // 15
  localparam int unsigned DEC24_HPI_T = INV_T + NAND2_T + DVL_T + 2 * TGL_T; // 15

endpackage
