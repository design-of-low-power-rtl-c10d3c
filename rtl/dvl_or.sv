// DVL OR gate: 3-transistor dual-value-logic OR, out = X | Y.
//
// Dual of the DVL AND gate. X_n drives two transistor gates: one pass
// transistor that forwards Y while X is 0 and one that ties the output to the
// supply while X is 1. Y_n drives the third transistor, which ties the output
// to the supply whenever Y is 1. Only X_n, Y and Y_n are used. Logic value
// only, combinational, zero delay.
module dvl_or
  import mixed_logic_pkg::*;
(
  input  logic x_n,    // complement of control X
  input  logic y,      // propagate Y
  input  logic y_n,    // complement of Y
  output logic out     // X | Y
);

  localparam int unsigned TRANSISTOR_COUNT = DVL_T;
  localparam int unsigned TRANSISTOR_N     = OR3T_N;
  localparam int unsigned TRANSISTOR_P     = OR3T_P;

  always_comb begin
    if (!x_n || !y_n) out = 1'b1;  // either supply branch conducts
    else              out = y;     // pass transistor forwards Y
  end

endmodule
