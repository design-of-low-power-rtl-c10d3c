// 2-4LPI: 14-transistor low-power inverting 2-4 line decoder.
//
// Produces the four inverted minterms (maxterms) of A (MSB) and B: i[k] = 0
// for k = 2A+B, all others 1. Dual of 2-4LP, built from OR gates with a single
// inverter, on A:
//   I0 = A+B    TGL OR, control A,  propagate B
//   I1 = A+B'   DVL OR, control B' (needs only B), propagate A
//   I2 = A'+B   TGL OR, control A', propagate B
//   I3 = A'+B'  DVL OR, control B' (needs only B), propagate A'
// B' is never used, so there is no B inverter: 14 transistors (5 nMOS, 9 pMOS).
// Combinational, zero delay.
module dec2to4_lpi
  import mixed_logic_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output logic [3:0] i
);

  localparam int unsigned TRANSISTOR_COUNT = DEC24_LPI_T;
  localparam int unsigned TRANSISTOR_N     = 1 + 4 * OR3T_N;
  localparam int unsigned TRANSISTOR_P     = 1 + 4 * OR3T_P;

  logic a_n;
  assign a_n = ~a;   // the only inverter

  tgl_or u_i0 (.x(a),   .x_n(a_n), .y(b),   .out(i[0]));
  dvl_or u_i1 (.x_n(b), .y(a),     .y_n(a_n), .out(i[1]));
  tgl_or u_i2 (.x(a_n), .x_n(a),   .y(b),   .out(i[2]));
  dvl_or u_i3 (.x_n(b), .y(a_n),   .y_n(a), .out(i[3]));

endmodule
