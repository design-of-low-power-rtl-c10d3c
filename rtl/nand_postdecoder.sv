// NAND-based post-decoder of an inverting 4-16 line decoder.
//
// Combines two one-hot groups of predecoded lines (from two non-inverting 2-4
// predecoders) into 16 one-cold outputs with 16 static CMOS 2-input NAND
// gates:
//   i[4j + k] = ~(pre_hi[j] & pre_lo[k]),  j, k = 0..3
// pre_hi comes from the more significant input pair (A,B), pre_lo from (C,D).
// 16 x 4 = 64 transistors. Combinational, zero delay.
module nand_postdecoder
  import mixed_logic_pkg::*;
(
  input  logic [3:0]  pre_hi,   // one-hot, from (A,B)
  input  logic [3:0]  pre_lo,   // one-hot, from (C,D)
  output logic [15:0] i         // one-cold
);

  localparam int unsigned TRANSISTOR_COUNT = POSTDEC_GATES * NAND2_T;

  for (genvar j = 0; j < 4; j++) begin : g_hi
    for (genvar k = 0; k < 4; k++) begin : g_lo
      assign i[4*j + k] = ~(pre_hi[j] & pre_lo[k]);
    end
  end

endmodule
