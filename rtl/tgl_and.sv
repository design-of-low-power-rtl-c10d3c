// TGL AND gate: 3-transistor transmission-gate-logic AND, out = X & Y.
//
// The control signal X and its complement X_n drive the gate terminals of all
// three transistors: a transmission gate that passes the propagate signal Y to
// the output while X is 1, and a third transistor that holds the output at 0
// while X is 0. Both rails of the control must be supplied by the caller
// (normally from an inverter shared with other gates), only the true rail of Y
// is used. The model captures the logic value of each conduction path and no
// electrical effect (the real gate is full swing but not restoring).
// Purely combinational, zero delay.
module tgl_and
  import mixed_logic_pkg::*;
(
  input  logic x,      // control X
  input  logic x_n,    // complement of X
  input  logic y,      // propagate Y
  output logic out     // X & Y
);

  localparam int unsigned TRANSISTOR_COUNT = TGL_T;
  localparam int unsigned TRANSISTOR_N     = AND3T_N;
  localparam int unsigned TRANSISTOR_P     = AND3T_P;

  // the transmission gate conducts when either of its halves is on
  logic tg_on;
  assign tg_on = x | ~x_n;

  always_comb begin
    if (tg_on) out = y;       // Y propagates through the transmission gate
    else       out = 1'b0;    // control low: output tied to ground
  end

endmodule
