// tb_r8_control: self-checking test of the R8 control unit.
//
// Each of the 40 instructions is run alone from reset: the testbench plays
// the datapath, loading IR on the falling edge of the fetch cycle, and holds
// the flags at a chosen value. It checks
//   - the number of clock cycles until the control unit is back in the fetch
//     state (the instruction table: 4 for most, 3 for NOP and for a
//     conditional jump whose flag is 0, 2 and then forever for HALT);
//   - the execute state reached (Swbk, Sld, Sst, Sjmp, Ssbrt, Spush, Srts,
//     Spop, Sldsp);
//   - in every state, the register write enables and memory accesses of the
//     control state diagram, and the multiplexer selects the state needs
//     (PC source, SP source, memory address source, register write source,
//     S2 address, ALU operand sources) and the Inz/Icv flag enables.
// Conditional jumps are run with their own flag at 0 and at 1, with the other
// three flags at the opposite value.
module tb_r8_control;
  import r8_pkg::*;

  logic   ck = 1'b0, rst = 1'b1;
  word_t  ir = '0;
  flags_t flags = '0;
  uins_t  uins;
  int checks = 0, failures = 0;

  r8_control dut (.ck(ck), .rst(rst), .ir(ir), .flags(flags), .uins(uins));

  always #5 ck = ~ck;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 30) $display("FAIL t=%0t %s", $time, what);
    end
  endfunction

  typedef struct {
    string  name;
    word_t  word;
    state_e exec;      // fourth-cycle state, S_FETCH when there is none
    int     cond;      // -1 unconditional, else 0..3 = n, z, c, v
    bit     nz, cv;    // flag enables in Salu
    bit     ma_ir;     // opA from IR
    logic [1:0] mb;    // opB source
    bit     ms2_rt;    // S2 addressed by IR[11:8] when reading registers
  } test_t;

  localparam logic [1:0] B_RB = 2'b00, B_SP = 2'b01, B_PC = 2'b10;

  test_t tests [40] = '{
    '{"ADD",  16'h0123, S_WBK,  -1, 1, 1, 0, B_RB, 0},
    '{"SUB",  16'h1123, S_WBK,  -1, 1, 1, 0, B_RB, 0},
    '{"AND",  16'h2123, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"OR",   16'h3123, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"XOR",  16'h4123, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"ADDI", 16'h5177, S_WBK,  -1, 1, 1, 1, B_RB, 1},
    '{"SUBI", 16'h6177, S_WBK,  -1, 1, 1, 1, B_RB, 1},
    '{"LDL",  16'h7177, S_WBK,  -1, 0, 0, 1, B_RB, 1},
    '{"LDH",  16'h8177, S_WBK,  -1, 0, 0, 1, B_RB, 1},
    '{"LD",   16'h9123, S_LD,   -1, 0, 0, 0, B_RB, 0},
    '{"ST",   16'hA123, S_ST,   -1, 0, 0, 0, B_RB, 0},
    '{"SL0",  16'hB120, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"SL1",  16'hB121, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"SR0",  16'hB122, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"SR1",  16'hB123, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"NOT",  16'hB124, S_WBK,  -1, 1, 0, 0, B_RB, 0},
    '{"NOP",  16'hB005, S_FETCH,-1, 0, 0, 0, B_RB, 0},
    '{"HALT", 16'hB006, S_HALT, -1, 0, 0, 0, B_RB, 0},
    '{"LDSP", 16'hB037, S_LDSP, -1, 0, 0, 0, B_RB, 0},
    '{"RTS",  16'hB008, S_RTS,  -1, 0, 0, 0, B_SP, 0},
    '{"POP",  16'hB409, S_POP,  -1, 0, 0, 0, B_SP, 0},
    '{"PUSH", 16'hB40A, S_PUSH, -1, 0, 0, 0, B_RB, 1},
    '{"JMPR", 16'hC030, S_JMP,  -1, 0, 0, 0, B_PC, 0},
    '{"JMPNR",16'hC031, S_JMP,   0, 0, 0, 0, B_PC, 0},
    '{"JMPZR",16'hC032, S_JMP,   1, 0, 0, 0, B_PC, 0},
    '{"JMPCR",16'hC033, S_JMP,   2, 0, 0, 0, B_PC, 0},
    '{"JMPVR",16'hC034, S_JMP,   3, 0, 0, 0, B_PC, 0},
    '{"JMP",  16'hC035, S_JMP,  -1, 0, 0, 0, B_PC, 0},
    '{"JMPN", 16'hC036, S_JMP,   0, 0, 0, 0, B_PC, 0},
    '{"JMPZ", 16'hC037, S_JMP,   1, 0, 0, 0, B_PC, 0},
    '{"JMPC", 16'hC038, S_JMP,   2, 0, 0, 0, B_PC, 0},
    '{"JMPV", 16'hC039, S_JMP,   3, 0, 0, 0, B_PC, 0},
    '{"JSRR", 16'hC03A, S_SBRT, -1, 0, 0, 0, B_PC, 0},
    '{"JSR",  16'hC03B, S_SBRT, -1, 0, 0, 0, B_PC, 0},
    '{"JMPD", 16'hD3F0, S_JMP,  -1, 0, 0, 1, B_PC, 0},
    '{"JMPND",16'hE210, S_JMP,   0, 0, 0, 1, B_PC, 0},
    '{"JMPZD",16'hE610, S_JMP,   1, 0, 0, 1, B_PC, 0},
    '{"JMPCD",16'hEA10, S_JMP,   2, 0, 0, 1, B_PC, 0},
    '{"JMPVD",16'hEE10, S_JMP,   3, 0, 0, 1, B_PC, 0},
    '{"JSRD", 16'hF800, S_SBRT, -1, 0, 0, 1, B_PC, 0}
  };

  // Expected write enables {wpc, wsp, wir, wab, walu, wreg} and memory
  // access {ce, rw} in each state, from the control state diagram.
  function automatic logic [7:0] enables_of(input state_e s);
    case (s)
      S_FETCH: return 8'b101000_11;
      S_RREG:  return 8'b000100_0x;
      S_ALU:   return 8'b000010_0x;
      S_WBK:   return 8'b000001_0x;
      S_LD:    return 8'b000001_11;
      S_ST:    return 8'b000000_10;
      S_JMP:   return 8'b100000_0x;
      S_SBRT:  return 8'b110000_10;
      S_PUSH:  return 8'b010000_10;
      S_RTS:   return 8'b110000_11;
      S_POP:   return 8'b010001_11;
      S_LDSP:  return 8'b010000_0x;
      default: return 8'b000000_0x;  // S_HALT
    endcase
  endfunction

  task automatic check_state(input test_t t, input state_e s);
    logic [7:0] e, g;
    e = enables_of(s);
    g = {uins.wpc, uins.wsp, uins.wir, uins.wab, uins.walu, uins.wreg, uins.ce, uins.rw};
    check(g[7:1] == e[7:1] && (!e[1] || g[0] == e[0]),
          $sformatf("%s in %s: enables %b expected %b", t.name, s.name(), g, e));
    check((s == S_ALU) ? (uins.wnz == t.nz && uins.wcv == t.cv) : !(uins.wnz || uins.wcv),
          $sformatf("%s in %s: flag enables %b%b", t.name, s.name(), uins.wnz, uins.wcv));
    case (s)
      S_FETCH: check(uins.mpc == 2'b10 && uins.mad == 2'b01, $sformatf("%s fetch muxes", t.name));
      S_RREG:  check(uins.ms2 == t.ms2_rt, $sformatf("%s rreg ms2", t.name));
      S_ALU:   check(uins.ma == t.ma_ir && uins.mb == t.mb,
                     $sformatf("%s alu operands ma=%b mb=%b", t.name, uins.ma, uins.mb));
      S_WBK:   check(uins.mreg == 1'b0, $sformatf("%s wbk mreg", t.name));
      S_LD:    check(uins.mreg == 1'b1 && uins.mad == 2'b00, $sformatf("%s ld muxes", t.name));
      S_ST:    check(uins.ms2 == 1'b1 && uins.mad == 2'b00, $sformatf("%s st muxes", t.name));
      S_JMP:   check(uins.mpc == 2'b01, $sformatf("%s jmp mpc", t.name));
      S_SBRT:  check(uins.mpc == 2'b01 && uins.mad == 2'b10 && uins.msp == 1'b1,
                     $sformatf("%s sbrt muxes", t.name));
      S_PUSH:  check(uins.mad == 2'b10 && uins.msp == 1'b1 && uins.ms2 == 1'b1,
                     $sformatf("%s push muxes", t.name));
      S_RTS:   check(uins.mpc == 2'b00 && uins.mad == 2'b00 && uins.msp == 1'b0,
                     $sformatf("%s rts muxes", t.name));
      S_POP:   check(uins.mreg == 1'b1 && uins.mad == 2'b00 && uins.msp == 1'b0,
                     $sformatf("%s pop muxes", t.name));
      S_LDSP:  check(uins.msp == 1'b0, $sformatf("%s ldsp msp", t.name));
      default: ;
    endcase
  endtask

  // Runs one instruction from reset; returns cycles and the execute state.
  task automatic run_one(input test_t t, input flags_t f, output int cycles,
                         output state_e exec);
    state_e s;
    rst = 1'b1;
    ir = 16'hFFFF;
    flags = f;
    @(posedge ck);
    #1 rst = 1'b0;
    cycles = 0;
    exec = S_FETCH;
    check(dut.state == S_FETCH, $sformatf("%s starts in fetch", t.name));
    check_state(t, S_FETCH);
    @(negedge ck) ir = t.word;        // the datapath loads IR
    forever begin
      @(posedge ck);
      #1;
      cycles++;
      s = dut.state;
      if (s == S_FETCH) break;
      if (!(s inside {S_RREG, S_ALU})) exec = s;
      check_state(t, s);
      if (s == S_HALT) begin
        repeat (5) @(posedge ck);
        #1 check(dut.state == S_HALT, "HALT holds");
        cycles = 2;
        break;
      end
      if (cycles > 6) break;
    end
  endtask

  initial begin
    int cyc;
    state_e ex;
    flags_t f;
    for (int k = 0; k < 40; k++) begin
      if (tests[k].cond < 0) begin
        run_one(tests[k], flags_t'(4'($urandom)), cyc, ex);
        check(cyc == ((tests[k].exec == S_FETCH) ? 3 : (tests[k].exec == S_HALT) ? 2 : 4),
              $sformatf("%s took %0d cycles", tests[k].name, cyc));
        check(ex == tests[k].exec, $sformatf("%s executed in %s", tests[k].name, ex.name()));
      end else begin
        for (int v = 0; v < 2; v++) begin
          f = v ? flags_t'(4'b1000 >> tests[k].cond) : flags_t'(~(4'b1000 >> tests[k].cond));
          run_one(tests[k], f, cyc, ex);
          check(cyc == (v ? 4 : 3), $sformatf("%s flag=%0d took %0d cycles", tests[k].name, v, cyc));
          check(ex == (v ? S_JMP : S_FETCH), $sformatf("%s flag=%0d went to %s",
                                                       tests[k].name, v, ex.name()));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
