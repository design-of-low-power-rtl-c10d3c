// Self-checking testbench for dec4to16_lpi, the 4-16LPI (inverting, 2-4LP predecoders, NAND post-decoder) 4-16 line decoder.
//
// Applies all 16 codes {A,B,C,D} in counting order (D toggling fastest, as in
// an exhaustive sweep), then 500 random codes, and compares the 16 outputs
// with the expected one-cold pattern computed here by shifting. Checks
// that every line was selected at least once and that the transistor count is
// the published 92. A watchdog ends the run if it stalls.
module tb_dec4to16_lpi;
  logic [3:0]  sel;
  logic [15:0] i;
  logic [15:0] expected;
  int checks = 0;
  int failures = 0;
  int selected [16];

  dec4to16_lpi dut (.sel(sel), .i(i));

  task automatic apply(input logic [3:0] s);
    sel = s;
    #1;
    expected = ~(16'h0001 << s);
    checks++;
    if (i !== expected) begin
      failures++;
      $display("FAIL sel=%b i=%h expected %h", sel, i, expected);
    end
    for (int n = 0; n < 16; n++)
      if (i[n] == 1'b0) selected[n]++;
  endtask

  initial begin
    for (int n = 0; n < 16; n++) selected[n] = 0;
    for (int s = 0; s < 16; s++) apply(4'(s));
    repeat (500) apply(4'($urandom));
    for (int n = 0; n < 16; n++) begin
      checks++;
      if (selected[n] == 0) begin
        failures++;
        $display("FAIL line %0d never selected", n);
      end
    end
    checks++;
    if (dut.TRANSISTOR_COUNT != 92) begin
      failures++;
      $display("FAIL transistor count %0d, expected 92", dut.TRANSISTOR_COUNT);
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
