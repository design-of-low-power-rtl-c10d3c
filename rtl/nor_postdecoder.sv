// NOR-based post-decoder of a 4-16 line decoder.
//
// Combines two one-cold groups of predecoded lines (from two inverting 2-4
// predecoders) into 16 one-hot outputs with 16 static CMOS 2-input NOR gates:
//   d[4j + k] = ~(pre_hi[j] | pre_lo[k]),  j, k = 0..3
// pre_hi comes from the more significant input pair (A,B), pre_lo from (C,D).
// The NOR stage restores full logic levels after the pass-transistor
// predecoders. 16 x 4 = 64 transistors. Combinational, zero delay.
module nor_postdecoder
  import mixed_logic_pkg::*;
(
  input  logic [3:0]  pre_hi,   // one-cold, from (A,B)
  input  logic [3:0]  pre_lo,   // one-cold, from (C,D)
  output logic [15:0] d         // one-hot
);

  localparam int unsigned TRANSISTOR_COUNT = POSTDEC_T;

  for (genvar j = 0; j < 4; j++) begin : g_hi
    for (genvar k = 0; k < 4; k++) begin : g_lo
      assign d[4*j + k] = ~(pre_hi[j] | pre_lo[k]);
    end
  end

endmodule
