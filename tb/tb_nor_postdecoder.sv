// Self-checking testbench for nor_postdecoder, which combines two one-cold predecoded groups into one-hot lines with 2-input NOR gates.
//
// First applies the 16 legal input pairs that two predecoders can produce and
// expects exactly line 4j+k to be selected; then applies 300 arbitrary random
// input pairs and checks every output bit against its own 2-input gate. Also
// checks the 64-transistor count. A watchdog ends the run if it stalls.
module tb_nor_postdecoder;
  logic [3:0]  pre_hi, pre_lo;
  logic [15:0] d;
  logic [15:0] expected;
  int checks = 0;
  int failures = 0;

  nor_postdecoder dut (.pre_hi(pre_hi), .pre_lo(pre_lo), .d(d));

  initial begin
    for (int j = 0; j < 4; j++) begin
      for (int k = 0; k < 4; k++) begin
        pre_hi = ~(4'b0001 << j);
        pre_lo = ~(4'b0001 << k);
        #1;
        expected = 16'h0001 << (4*j + k);
        checks++;
        if (d !== expected) begin
          failures++;
          $display("FAIL j=%0d k=%0d d=%h expected %h", j, k, d, expected);
        end
      end
    end
    repeat (300) begin
      pre_hi = 4'($urandom);
      pre_lo = 4'($urandom);
      #1;
      for (int n = 0; n < 16; n++) expected[n] = ~(pre_hi[n / 4] | pre_lo[n % 4]);
      checks++;
      if (d !== expected) begin
        failures++;
        $display("FAIL hi=%b lo=%b d=%h expected %h", pre_hi, pre_lo, d, expected);
      end
    end
    checks++;
    if (dut.TRANSISTOR_COUNT != 64) begin
      failures++;
      $display("FAIL transistor count %0d, expected 64", dut.TRANSISTOR_COUNT);
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
