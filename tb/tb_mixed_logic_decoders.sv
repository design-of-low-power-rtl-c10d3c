// End-to-end testbench for mixed_logic_decoders: all eight mixed-logic
// decoders (four 2-4, four 4-16) side by side, at the default configuration.
//
// Phase 1 sweeps every code through every decoder at once (all 16 codes
// {A,B,C,D}, the 2-4 decoders seeing the low two bits); phase 2 drives each
// decoder with its own independent random code, 2000 times, so that a wiring
// mix-up between decoders would show. Every output is compared with the
// one-hot (LP, HP) or one-cold (LPI, HPI) pattern computed here by shifting.
// The test counts how often each output line of each decoder was selected and
// fails for any line never selected, and checks the published transistor
// counts of the 4-16 decoders (92, 94, 92, 94). A watchdog ends the run if it
// stalls.
module tb_mixed_logic_decoders;
  typedef enum int {
    LP2 = 0, HP2 = 1, LPI2 = 2, HPI2 = 3, LP = 4, HP = 5, LPI = 6, HPI = 7
  } variant_e;

  logic [3:0]  sel [8];
  logic [3:0]  lp2_d, hp2_d, lpi2_i, hpi2_i;
  logic [15:0] lp_d, hp_d, lpi_i, hpi_i;
  int checks = 0;
  int failures = 0;
  int selected [8][16];

  mixed_logic_decoders dut (
    .lp2_sel (sel[LP2][1:0]),  .lp2_d (lp2_d),
    .hp2_sel (sel[HP2][1:0]),  .hp2_d (hp2_d),
    .lpi2_sel(sel[LPI2][1:0]), .lpi2_i(lpi2_i),
    .hpi2_sel(sel[HPI2][1:0]), .hpi2_i(hpi2_i),
    .lp_sel  (sel[LP]),        .lp_d  (lp_d),
    .hp_sel  (sel[HP]),        .hp_d  (hp_d),
    .lpi_sel (sel[LPI]),       .lpi_i (lpi_i),
    .hpi_sel (sel[HPI]),       .hpi_i (hpi_i)
  );

  function automatic int lines_of(input int v);
    return (v < 4) ? 4 : 16;
  endfunction

  // got/exp are zero-extended for the 4-line decoders
  task automatic check_one(input int v, input logic [15:0] got, input bit active_low);
    logic [15:0] exp;
    int          code;
    code = (v < 4) ? int'(sel[v][1:0]) : int'(sel[v]);
    exp  = 16'h0001 << code;
    if (active_low) exp = ~exp;
    if (v < 4) exp[15:4] = 12'h000;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sel=%b out=%h expected %h", variant_e'(v), sel[v], got, exp);
    end
    for (int n = 0; n < lines_of(v); n++)
      if (got[n] == !active_low) selected[v][n]++;
  endtask

  task automatic check_all();
    #1;
    check_one(LP2,  {12'h000, lp2_d},  1'b0);
    check_one(HP2,  {12'h000, hp2_d},  1'b0);
    check_one(LPI2, {12'h000, lpi2_i}, 1'b1);
    check_one(HPI2, {12'h000, hpi2_i}, 1'b1);
    check_one(LP,   lp_d,   1'b0);
    check_one(HP,   hp_d,   1'b0);
    check_one(LPI,  lpi_i,  1'b1);
    check_one(HPI,  hpi_i,  1'b1);
  endtask

  initial begin
    for (int v = 0; v < 8; v++)
      for (int n = 0; n < 16; n++) selected[v][n] = 0;

    // phase 1: common exhaustive sweep
    for (int s = 0; s < 16; s++) begin
      for (int v = 0; v < 8; v++) sel[v] = 4'(s);
      check_all();
    end
    // phase 2: independent random codes per decoder
    repeat (2000) begin
      for (int v = 0; v < 8; v++) sel[v] = 4'($urandom);
      check_all();
    end

    for (int v = 0; v < 8; v++) begin
      for (int n = 0; n < lines_of(v); n++) begin
        checks++;
        if (selected[v][n] == 0) begin
          failures++;
          $display("FAIL %s line %0d never selected", variant_e'(v), n);
        end
      end
      $display("%-4s: line 0 selected %0d times, line %0d selected %0d times",
               variant_e'(v), selected[v][0], lines_of(v) - 1, selected[v][lines_of(v) - 1]);
    end

    checks++;
    if (dut.TRANSISTOR_COUNT_LP != 92 || dut.TRANSISTOR_COUNT_HP != 94 ||
        dut.TRANSISTOR_COUNT_LPI != 92 || dut.TRANSISTOR_COUNT_HPI != 94) begin
      failures++;
      $display("FAIL transistor counts %0d %0d %0d %0d", dut.TRANSISTOR_COUNT_LP,
               dut.TRANSISTOR_COUNT_HP, dut.TRANSISTOR_COUNT_LPI, dut.TRANSISTOR_COUNT_HPI);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
