// Mixed-logic line decoders: the four proposed 2-4 decoders and the four
// proposed 4-16 decoders side by side.
//
// A line decoder turns an n-bit code into 2^n lines of which exactly one is
// selected. The designs here reduce transistor count and power against plain
// static CMOS by building the 2-4 stages from 3-transistor transmission-gate
// (TGL) and dual-value (DVL) pass-transistor gates, which share one input
// inverter and need no inverter at all on the second input, and by finishing
// the 4-16 decoders with a static CMOS NOR or NAND post-decoder that restores
// full logic levels.
//
//   4-16LP  : 2 x 2-4LPI (14 T) + NOR post-decoder  -> one-hot,  92 T
//   4-16HP  : 2 x 2-4HPI (15 T) + NOR post-decoder  -> one-hot,  94 T
//   4-16LPI : 2 x 2-4LP  (14 T) + NAND post-decoder -> one-cold, 92 T
//   4-16HPI : 2 x 2-4HP  (15 T) + NAND post-decoder -> one-cold, 94 T
//
//   2-4LP / 2-4LPI : 14 T, one-hot / one-cold
//   2-4HP / 2-4HPI : 15 T, one-hot / one-cold
//
// The eight are alternatives, not parts of one circuit, so each has its own
// input ({A,B} or {A,B,C,D}, A the MSB) and output ports. The 2-4 decoders
// appear once on their own and again as predecoders inside the 4-16 decoders.
// The topologies and their pairing follow the published designs; the bit
// order, the port layout and the gate arrangement of the two 15-transistor
// 2-4 decoders are this design's choices (see the leaf modules).
// Purely combinational: no clock, no reset, zero delay.
module mixed_logic_decoders
  import mixed_logic_pkg::*;
(
  input  logic [1:0]  lp2_sel,    // {A, B}
  output logic [3:0]  lp2_d,
  input  logic [1:0]  hp2_sel,
  output logic [3:0]  hp2_d,
  input  logic [1:0]  lpi2_sel,
  output logic [3:0]  lpi2_i,
  input  logic [1:0]  hpi2_sel,
  output logic [3:0]  hpi2_i,
  input  logic [3:0]  lp_sel,     // {A, B, C, D}
  output logic [15:0] lp_d,
  input  logic [3:0]  hp_sel,
  output logic [15:0] hp_d,
  input  logic [3:0]  lpi_sel,
  output logic [15:0] lpi_i,
  input  logic [3:0]  hpi_sel,
  output logic [15:0] hpi_i
);

  localparam int unsigned TRANSISTOR_COUNT_LP  = 2 * DEC24_LPI_T + POSTDEC_T;
  localparam int unsigned TRANSISTOR_COUNT_HP  = 2 * DEC24_HPI_T + POSTDEC_T;
  localparam int unsigned TRANSISTOR_COUNT_LPI = 2 * DEC24_LP_T  + POSTDEC_T;
  localparam int unsigned TRANSISTOR_COUNT_HPI = 2 * DEC24_HP_T  + POSTDEC_T;

  dec2to4_lp  u_lp2  (.a(lp2_sel[1]),  .b(lp2_sel[0]),  .d(lp2_d));
  dec2to4_hp  u_hp2  (.a(hp2_sel[1]),  .b(hp2_sel[0]),  .d(hp2_d));
  dec2to4_lpi u_lpi2 (.a(lpi2_sel[1]), .b(lpi2_sel[0]), .i(lpi2_i));
  dec2to4_hpi u_hpi2 (.a(hpi2_sel[1]), .b(hpi2_sel[0]), .i(hpi2_i));

  dec4to16_lp  u_lp  (.sel(lp_sel),  .d(lp_d));
  dec4to16_hp  u_hp  (.sel(hp_sel),  .d(hp_d));
  dec4to16_lpi u_lpi (.sel(lpi_sel), .i(lpi_i));
  dec4to16_hpi u_hpi (.sel(hpi_sel), .i(hpi_i));

endmodule
