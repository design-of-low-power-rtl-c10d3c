// TGL OR gate: 3-transistor transmission-gate-logic OR, out = X | Y.
//
// Dual of the TGL AND gate. X and X_n drive all three transistor gates: the
// transmission gate passes the propagate signal Y while X is 0, the third
// transistor ties the output to the supply while X is 1. Only the true rail
// of Y is used. Logic value only, combinational, zero delay.
module tgl_or
  import mixed_logic_pkg::*;
(
  input  logic x,      // control X
  input  logic x_n,    // complement of X
  input  logic y,      // propagate Y
  output logic out     // X | Y
);

  localparam int unsigned TRANSISTOR_COUNT = TGL_T;
  localparam int unsigned TRANSISTOR_N     = OR3T_N;
  localparam int unsigned TRANSISTOR_P     = OR3T_P;

  // the transmission gate conducts while the control is low
  logic tg_on;
  assign tg_on = ~x | x_n;

  always_comb begin
    if (tg_on) out = y;       // Y propagates through the transmission gate
    else       out = 1'b1;    // control high: output tied to the supply
  end

endmodule
