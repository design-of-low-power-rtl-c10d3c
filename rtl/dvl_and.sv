// DVL AND gate: 3-transistor dual-value-logic AND, out = X & Y.
//
// The complement of the control, X_n, drives two transistor gates: one pass
// transistor that forwards the propagate signal Y while X is 1, and one that
// ties the output to 0 while X is 0. The complement of the propagate signal,
// Y_n, drives the third transistor, which ties the output to 0 whenever Y is
// 0. The true rail of X is not needed at all; this is what lets a decoder
// built from these gates drop one of its input inverters. Logic value only,
// combinational, zero delay.
module dvl_and
  import mixed_logic_pkg::*;
(
  input  logic x_n,    // complement of control X
  input  logic y,      // propagate Y
  input  logic y_n,    // complement of Y
  output logic out     // X & Y
);

  localparam int unsigned TRANSISTOR_COUNT = DVL_T;
  localparam int unsigned TRANSISTOR_N     = AND3T_N;
  localparam int unsigned TRANSISTOR_P     = AND3T_P;

  always_comb begin
    if (x_n || y_n) out = 1'b0;  // either grounded branch conducts
    else            out = y;     // pass transistor forwards Y
  end

endmodule
