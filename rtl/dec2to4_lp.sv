// 2-4LP: 14-transistor low-power 2-4 line decoder (non-inverting).
//
// Produces the four minterms of inputs A (MSB) and B: d[k] = 1 for k = 2A+B,
// all other outputs 0. Mixed-logic topology with a single inverter, on A:
//   D0 = A'B'  DVL AND, control B' (needs only its complement B), propagate A'
//   D1 = A'B   TGL AND, control A',                               propagate B
//   D2 = AB'   DVL AND, control B' (needs only B),                propagate A
//   D3 = AB    TGL AND, control A,                                propagate B
// Because the DVL gates need only the complement of their control and the TGL
// gates only the true rail of their propagate signal, B' is never used and the
// B inverter is omitted: 4 x 3 + 2 = 14 transistors (9 nMOS, 5 pMOS).
// The gate type and signal arrangement of each output follow the published
// low-power topology, with outputs numbered as in the truth table (A is the
// MSB, so D1 is A'B and D2 is AB').
// Combinational, zero delay.
module dec2to4_lp
  import mixed_logic_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output logic [3:0] d
);

  localparam int unsigned TRANSISTOR_COUNT = DEC24_LP_T;
  localparam int unsigned TRANSISTOR_N     = 1 + 4 * AND3T_N;
  localparam int unsigned TRANSISTOR_P     = 1 + 4 * AND3T_P;

  logic a_n;
  assign a_n = ~a;   // the only inverter

  dvl_and u_d0 (.x_n(b),   .y(a_n), .y_n(a),   .out(d[0]));
  tgl_and u_d1 (.x(a_n),   .x_n(a), .y(b),     .out(d[1]));
  dvl_and u_d2 (.x_n(b),   .y(a),   .y_n(a_n), .out(d[2]));
  tgl_and u_d3 (.x(a),     .x_n(a_n), .y(b),   .out(d[3]));

endmodule
