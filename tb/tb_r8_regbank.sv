// tb_r8_regbank: self-checking test of the 16 x 16-bit register bank.
//
// After reset every register must read zero. Then random writes (target
// IR[11:8], data dtreg, enable wreg) and random read addresses for S1
// (IR[7:4]) and S2 (IR[3:0] or IR[11:8] by ms2) are applied; a reference
// array updated on the same falling edge gives the expected read values.
// Also checks that a write with wreg = 0 changes nothing and that the write
// lands on the falling edge, not the rising one.
module tb_r8_regbank;
  import r8_pkg::*;

  logic  ck = 1'b0, rst = 1'b1;
  word_t ir = '0, dtreg = '0, s1, s2;
  logic  ms2 = 1'b0, wreg = 1'b0;
  word_t model [16];
  int checks = 0, failures = 0;

  r8_regbank dut (.ck(ck), .rst(rst), .ir(ir), .ms2(ms2), .wreg(wreg),
                  .dtreg(dtreg), .s1(s1), .s2(s2));

  always #5 ck = ~ck;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endfunction

  initial begin
    for (int r = 0; r < 16; r++) model[r] = '0;
    #12 rst = 1'b0;
    // all cleared
    for (int r = 0; r < 16; r++) begin
      ir = {4'h0, 4'(r), 4'(r), 4'(15 - r)};
      ms2 = 1'b1;
      #1 check(s1 == 16'h0 && s2 == 16'h0, $sformatf("R%0d not cleared", r));
    end
    // random traffic
    for (int k = 0; k < 2000; k++) begin
      @(posedge ck);
      ir    = word_t'($urandom);
      ms2   = 1'($urandom);
      wreg  = ($urandom % 3) != 0;
      dtreg = word_t'($urandom);
      #1;
      check(s1 == model[ir[7:4]], "S1 read");
      check(s2 == model[ms2 ? ir[11:8] : ir[3:0]], "S2 read");
      @(negedge ck);
      if (wreg) model[ir[11:8]] = dtreg;
      #1;
      check(s1 == model[ir[7:4]], "S1 after write");
      check(s2 == model[ms2 ? ir[11:8] : ir[3:0]], "S2 after write");
    end
    // a write is not visible before the falling edge
    @(posedge ck);
    ir = 16'h0333; ms2 = 1'b1; wreg = 1'b1; dtreg = ~model[3];
    #1 check(s2 == model[3], "no write before falling edge");
    @(negedge ck); model[3] = dtreg;
    #1 check(s2 == model[3] && s1 == model[3], "write on falling edge");
    wreg = 1'b0;
    // reset clears again
    rst = 1'b1;
    #1;
    for (int r = 0; r < 16; r++) begin
      ir = {4'h0, 4'h0, 4'(r), 4'(r)};
      ms2 = 1'b0;
      #1 check(s1 == 16'h0 && s2 == 16'h0, "reset clears");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
