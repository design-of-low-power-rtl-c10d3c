// Self-checking testbench for dec2to4_hp, the 2-4HP (high-performance, non-inverting) 2-4 line decoder.
//
// Applies the four input codes {A,B}, in counting order and then 200 random
// codes, and compares the outputs with the 2-4 decoder truth table (selected line 1, others 0), computed here by shifting.
// Checks the published transistor count of 15. A watchdog ends the run if it
// stalls.
module tb_dec2to4_hp;
  logic       a, b;
  logic [3:0] d;
  logic [3:0] expected;
  int checks = 0;
  int failures = 0;

  dec2to4_hp dut (.a(a), .b(b), .d(d));

  task automatic apply(input logic [1:0] k);
    {a, b} = k;
    #1;
    expected = 4'b0001 << k;
    checks++;
    if (d !== expected) begin
      failures++;
      $display("FAIL A=%0b B=%0b d=%b expected %b", a, b, d, expected);
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
