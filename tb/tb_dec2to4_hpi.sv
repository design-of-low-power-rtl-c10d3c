// Self-checking testbench for dec2to4_hpi, the 2-4HPI (high-performance, inverting) 2-4 line decoder.
//
// Applies the four input codes {A,B}, in counting order and then 200 random
// codes, and compares the outputs with Table II of an inverting 2-4 decoder (selected line 0, others 1), computed here by shifting.
// Checks the published transistor count of 15. A watchdog ends the run if it
// stalls.
module tb_dec2to4_hpi;
  logic       a, b;
  logic [3:0] i;
  logic [3:0] expected;
  int checks = 0;
  int failures = 0;

  dec2to4_hpi dut (.a(a), .b(b), .i(i));

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
    if (dut.TRANSISTOR_COUNT != 15) begin
      failures++;
      $display("FAIL transistor count %0d, expected 15", dut.TRANSISTOR_COUNT);
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
