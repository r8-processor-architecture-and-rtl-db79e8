// tb_r8_decoder: exhaustive test of the R8 instruction decoder.
//
// All 65536 instruction words are applied. The expected instruction class and
// jump condition are derived here from the mnemonic of each word (the 40
// instructions of the instruction table, with unused codes taken as NOP),
// then grouped into classes independently of the decoder's own case tree.
module tb_r8_decoder;
  import r8_pkg::*;

  word_t  ir;
  instr_e instr;
  cond_e  cond;
  int checks = 0, failures = 0;
  int seen [28];

  r8_decoder dut (.ir(ir), .instr(instr), .cond(cond));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s", what);
    end
  endfunction

  function automatic string mnemonic(input word_t w);
    string misc [11] = '{"SL0", "SL1", "SR0", "SR1", "NOT", "NOP", "HALT", "LDSP",
                         "RTS", "POP", "PUSH"};
    string jr [12] = '{"JMPR", "JMPNR", "JMPZR", "JMPCR", "JMPVR",
                       "JMP", "JMPN", "JMPZ", "JMPC", "JMPV", "JSRR", "JSR"};
    string top [11] = '{"ADD", "SUB", "AND", "OR", "XOR", "ADDI", "SUBI", "LDL",
                        "LDH", "LD", "ST"};
    string jd [4] = '{"JMPND", "JMPZD", "JMPCD", "JMPVD"};
    int o = int'(w[15:12]);
    int lo = int'(w[3:0]);
    if (o <= 10) return top[o];
    if (o == 11) return (lo <= 10) ? misc[lo] : "NOP";
    if (o == 12) return (lo <= 11) ? jr[lo] : "NOP";
    if (o == 13) return "JMPD";
    if (o == 14) return jd[w[11:10]];
    return "JSRD";
  endfunction

  task automatic expected(input string m, output instr_e ei, output cond_e ec);
    string base;
    ec = COND_ALWAYS;
    ei = I_NOP;
    // conditional jumps: JMP<c>R, JMP<c>, JMP<c>D
    if (m.len() >= 4 && m.substr(0, 2) == "JMP") begin
      base = m.substr(3, m.len() - 1);   // "", "R", "D", "N", "NR", ...
      if (base.len() > 0 && base[0] inside {"N", "Z", "C", "V"}) begin
        case (base[0])
          "N": ec = COND_N;
          "Z": ec = COND_Z;
          "C": ec = COND_C;
          default: ec = COND_V;
        endcase
        base = base.substr(1, base.len() - 1);
      end
      if (base == "R")      ei = I_JUMPR;
      else if (base == "D") ei = I_JUMPD;
      else                  ei = I_JUMP;
      return;
    end
    if (m == "JMP") begin ei = I_JUMP; return; end
    for (int k = 0; k <= int'(I_JSRD); k++) begin
      instr_e e = instr_e'(k);
      if ({"I_", m} == e.name()) ei = e;
    end
  endtask

  initial begin
    instr_e ei;
    cond_e  ec;
    for (int w = 0; w < 65536; w++) begin
      ir = word_t'(w);
      #1;
      expected(mnemonic(ir), ei, ec);
      check(instr == ei, $sformatf("ir=%h %s got %s exp %s", ir, mnemonic(ir),
                                   instr.name(), ei.name()));
      if (ei inside {I_JUMPR, I_JUMP, I_JUMPD})
        check(cond == ec, $sformatf("ir=%h %s cond %s exp %s", ir, mnemonic(ir),
                                    cond.name(), ec.name()));
      seen[int'(instr)]++;
    end
    for (int k = 0; k < 28; k++) begin
      ei = instr_e'(k);
      check(seen[k] > 0, $sformatf("class %s never decoded", ei.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
