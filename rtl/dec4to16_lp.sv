// 4-16LP: mixed-logic 4-16 line decoder, non-inverting (one-hot outputs).
//
// Decodes sel = {A,B,C,D} (A is the MSB) into 16 lines. Two dec2to4_lpi 2-4
// predecoders, one on (A,B) and one on (C,D), each produce a group of four
// one-cold lines; the nor_postdecoder then forms all 16 combinations with static CMOS
// 2-input gates, so that every output is driven by a restoring gate:
//   d[4j + k] from predecoded line j of (A,B) and line k of (C,D).
// The pairing of predecoder type and post-decoder type follows the published
// topology; the bit order (A most significant, (A,B) on the first predecoder)
// is this design's choice.
// Transistor count: 2 predecoders + 64 = 92. Combinational, zero delay.
module dec4to16_lp
  import mixed_logic_pkg::*;
(
  input  logic [3:0]  sel,   // {A, B, C, D}
  output logic [15:0] d
);

  localparam int unsigned TRANSISTOR_COUNT = 2 * DEC24_LPI_T + POSTDEC_T;

  logic [3:0] pre_hi;   // predecoded (A,B)
  logic [3:0] pre_lo;   // predecoded (C,D)

  dec2to4_lpi u_pre_hi (.a(sel[3]), .b(sel[2]), .i(pre_hi));
  dec2to4_lpi u_pre_lo (.a(sel[1]), .b(sel[0]), .i(pre_lo));

  nor_postdecoder u_post (.pre_hi(pre_hi), .pre_lo(pre_lo), .d(d));

endmodule
