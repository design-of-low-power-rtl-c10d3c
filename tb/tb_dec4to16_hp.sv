// Self-checking testbench for dec4to16_hp, the 4-16HP (non-inverting, 2-4HPI predecoders, NOR post-decoder) 4-16 line decoder.
//
// Applies all 16 codes {A,B,C,D} in counting order (D toggling fastest, as in
// an exhaustive sweep), then 500 random codes, and compares the 16 outputs
// with the expected one-hot pattern computed here by shifting. Checks
// that every line was selected at least once and that the transistor count is
// the published 94. A watchdog ends the run if it stalls.
module tb_dec4to16_hp;
  logic [3:0]  sel;
  logic [15:0] d;
  logic [15:0] expected;
  int checks = 0;
  int failures = 0;
  int selected [16];

  dec4to16_hp dut (.sel(sel), .d(d));

  task automatic apply(input logic [3:0] s);
    sel = s;
    #1;
    expected = 16'h0001 << s;
    checks++;
    if (d !== expected) begin
      failures++;
      $display("FAIL sel=%b d=%h expected %h", sel, d, expected);
    end
    for (int n = 0; n < 16; n++)
      if (d[n] == 1'b1) selected[n]++;
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
    if (dut.TRANSISTOR_COUNT != 94) begin
      failures++;
      $display("FAIL transistor count %0d, expected 94", dut.TRANSISTOR_COUNT);
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
