// 2-4HP: 15-transistor high-performance 2-4 line decoder (non-inverting).
//
// Same function as 2-4LP: d[k] = 1 for k = 2A+B (A is the MSB). In 2-4LP the
// D0 = A'B' gate is the only one whose propagate signal is a complemented
// input, so its path runs through the A inverter. Here that gate is replaced
// by a 4-transistor static CMOS NOR of A and B, taking the inverter out of the
// D0 path at the cost of one transistor: 2 + 3 x 3 + 4 = 15 transistors.
// D1..D3 are the 2-4LP gates (D1 = A'B TGL AND, D2 = AB' DVL AND, D3 = AB
// TGL AND). The choice of which gate becomes static CMOS is
// this design's reading of the published 15-transistor topology, whose
// gate-level details are not reproduced here.
// Combinational, zero delay.
module dec2to4_hp
  import mixed_logic_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output logic [3:0] d
);

  localparam int unsigned TRANSISTOR_COUNT = DEC24_HP_T;

  logic a_n;
  assign a_n = ~a;   // the only inverter

  assign d[0] = ~(a | b);   // static CMOS NOR, fully restoring
  tgl_and u_d1 (.x(a_n),   .x_n(a),   .y(b),     .out(d[1]));
  dvl_and u_d2 (.x_n(b),   .y(a),     .y_n(a_n), .out(d[2]));
  tgl_and u_d3 (.x(a),     .x_n(a_n), .y(b),     .out(d[3]));

endmodule
