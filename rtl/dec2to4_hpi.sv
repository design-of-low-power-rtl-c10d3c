// 2-4HPI: 15-transistor high-performance inverting 2-4 line decoder.
//
// Same function as 2-4LPI: i[k] = 0 for k = 2A+B (A is the MSB). The
// I3 = A'+B' gate of 2-4LPI, the only one whose propagate signal is a
// complemented input, is replaced by a 4-transistor static CMOS NAND of A and
// B: 2 + 3 x 3 + 4 = 15 transistors. I0..I2 are the 2-4LPI gates. The choice
// of which gate becomes static CMOS is this design's reading of the published
// 15-transistor topology. Combinational, zero delay.
module dec2to4_hpi
  import mixed_logic_pkg::*;
(
  input  logic       a,
  input  logic       b,
  output logic [3:0] i
);

  localparam int unsigned TRANSISTOR_COUNT = DEC24_HPI_T;

  logic a_n;
  assign a_n = ~a;   // the only inverter

  tgl_or u_i0 (.x(a),   .x_n(a_n), .y(b),     .out(i[0]));
  dvl_or u_i1 (.x_n(b), .y(a),     .y_n(a_n), .out(i[1]));
  tgl_or u_i2 (.x(a_n), .x_n(a),   .y(b),     .out(i[2]));
  assign i[3] = ~(a & b);   // static CMOS NAND, fully restoring

endmodule
