// Self-checking testbench for dec2to4_lpi, the 2-4LPI (low-power, inverting) 2-4 line decoder.
//
// Applies the four input codes {A,B}, in counting order and then 200 random
// codes, and compares the outputs with Table II of an inverting 2-4 decoder (selected line 0, others 1), computed here by shifting.
// Checks the published transistor count of 14. A watchdog ends the run if it
// stalls.
module tb_dec2to4_lpi;
  logic       a, b;
  logic [3:0] i;
  logic [3:0] expected;
  int checks = 0;
  int failures = 0;

  dec2to4_lpi dut (.a(a), .b(b), .i(i));

  task automatic apply(input logic [1:0] k);
    {a, b} = k;
    #1;
    expected = ~(4'b0001 << k);
    checks++;
    if (i !== expected) begin
      failures++;
      $display("FAIL A=%0b B=%0b i=%b expected %b", a, b, i, expected);
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) apply(2'(k));
    repeat (200) apply(2'($urandom_range(3)));
    checks++;
    if (dut.TRANSISTOR_COUNT != 14) begin
      failures++;
      $display("FAIL transistor count %0d, expected 14", dut.TRANSISTOR_COUNT);
    end
    checks++;
    if (dut.TRANSISTOR_N != 5 || dut.TRANSISTOR_P != 9) begin
      failures++;
      $display("FAIL nMOS/pMOS split %0d/%0d, expected 5/9", dut.TRANSISTOR_N, dut.TRANSISTOR_P);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
