// Self-checking testbench for tgl_and, the 3-transistor TGL AND gate.
//
// Applies all four combinations of control X and propagate Y, with the
// complementary rails driven as true complements, and compares the output
// with the and truth table. Also checks the gate's transistor count and its
// nMOS/pMOS split. A watchdog ends the run if it stalls.
module tb_tgl_and;
  logic x, y, out;
  int checks = 0;
  int failures = 0;

  tgl_and dut (.x(x), .x_n(~x), .y(y), .out(out));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if (out !== (x & y)) begin
        failures++;
        $display("FAIL x=%0b y=%0b out=%0b", x, y, out);
      end
    end
    checks++;
    if (dut.TRANSISTOR_COUNT != 3 || dut.TRANSISTOR_N != 2 || dut.TRANSISTOR_P != 1) begin
      failures++;
      $display("FAIL transistor count %0d (%0dn/%0dp)", dut.TRANSISTOR_COUNT,
               dut.TRANSISTOR_N, dut.TRANSISTOR_P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
