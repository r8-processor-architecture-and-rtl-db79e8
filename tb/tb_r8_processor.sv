// tb_r8_processor: end-to-end test of the R8 processor with a 64K-word
// external memory model.
//
// An instruction-level reference model of the R8 instruction set (registers,
// PC, SP, flags and its own copy of memory) runs in lockstep with the
// processor. Each time the control unit returns to the fetch state, one
// instruction has completed: the reference executes the same instruction and
// the testbench compares PC, SP, the 16 registers and the four flags, and the
// number of clock cycles the processor spent against the count the
// instruction table gives (2 for HALT, 3 for NOP and for a conditional jump
// not taken, 4 for the rest). At the end of each program the whole memory is
// compared with the reference's.
//
// Programs:
//   1. the instruction test program of the R8 specification (stack and
//      subroutines, all ALU operations, loads, stores, shifts, jumps), run
//      until HALT; besides the lockstep comparison the register values the
//      program's comments state are checked at the points they name;
//   2. the stack example of the specification (LDSP, JSR, RTS with the
//      addresses it uses), checking PC, SP and the stacked return address;
//   3. several memories filled with random instruction words (jumps made
//      rarer, HALT words replaced by NOP, so that programs run long), run for a fixed number of
//      instructions or until a stored word turns into a HALT.
// Every control state, and conditional jumps both taken and not taken, must
// occur at least once. The processor runs at its default (and only)
// configuration.
module tb_r8_processor;
  import r8_pkg::*;

  localparam int unsigned MEM_WORDS    = 65536;
  localparam int unsigned RANDOM_RUNS  = 8;
  localparam int unsigned RANDOM_INSTR = 5000;

  logic  ck = 1'b0;
  logic  rst = 1'b1;
  word_t address, rdata, wdata;
  logic  ce, rw;
  logic  ld_en = 1'b0;
  word_t ld_addr = '0, ld_data = '0;

  r8_processor dut (
    .ck      (ck),
    .rst     (rst),
    .address (address),
    .data_in (rdata),
    .data_out(wdata),
    .ce      (ce),
    .rw      (rw)
  );

  r8_mem_model #(.ADDR_W(16)) u_mem (
    .ck     (ck),
    .address(address),
    .wdata  (wdata),
    .rdata  (rdata),
    .ce     (ce),
    .rw     (rw),
    .ld_en  (ld_en),
    .ld_addr(ld_addr),
    .ld_data(ld_data)
  );

  always #5 ck = ~ck;

  int checks = 0, failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endfunction

  // ------------------------------------------------------------ reference
  word_t m_reg [16];
  word_t m_mem [MEM_WORDS];
  word_t m_pc, m_sp;
  logic  m_n, m_z, m_c, m_v;
  bit    m_halt;
  word_t m_last_addr;     // address of the last executed instruction
  bit    m_last_cond;     // last instruction was a conditional jump
  bit    m_last_taken;

  function automatic bit cond_ok(input int c);
    case (c)
      0: return 1'b1;
      1: return m_n;
      2: return m_z;
      3: return m_c;
      4: return m_v;
      default: return 1'b0;
    endcase
  endfunction

  function automatic void set_nz(input word_t r);
    m_n = r[15];
    m_z = (r == 16'h0000);
  endfunction

  // Executes one instruction; returns its clock-cycle count.
  function automatic int ref_step();
    word_t ir, ra, rb, rt, r, k;
    logic [16:0] s;
    logic [3:0] op, t, a, b;
    int c;
    ir = m_mem[m_pc];
    m_last_addr = m_pc;
    m_last_cond = 1'b0;
    m_last_taken = 1'b0;
    op = ir[15:12]; t = ir[11:8]; a = ir[7:4]; b = ir[3:0];
    ra = m_reg[a]; rb = m_reg[b]; rt = m_reg[t];
    k  = {8'h00, ir[7:0]};
    m_pc = m_pc + 16'd1;
    case (op)
      4'h0: begin
        s = {1'b0, ra} + {1'b0, rb};
        m_reg[t] = s[15:0]; set_nz(s[15:0]); m_c = s[16];
        m_v = (ra[15] == rb[15]) && (s[15] != ra[15]);
        return 4;
      end
      4'h1: begin
        s = {1'b0, ra} + {1'b0, ~rb} + 17'd1;
        m_reg[t] = s[15:0]; set_nz(s[15:0]); m_c = s[16];
        m_v = (ra[15] != rb[15]) && (s[15] != ra[15]);
        return 4;
      end
      4'h2: begin r = ra & rb; m_reg[t] = r; set_nz(r); return 4; end
      4'h3: begin r = ra | rb; m_reg[t] = r; set_nz(r); return 4; end
      4'h4: begin r = ra ^ rb; m_reg[t] = r; set_nz(r); return 4; end
      4'h5: begin
        s = {1'b0, rt} + {1'b0, k};
        m_reg[t] = s[15:0]; set_nz(s[15:0]); m_c = s[16];
        m_v = !rt[15] && s[15];
        return 4;
      end
      4'h6: begin
        s = {1'b0, rt} + {1'b0, ~k} + 17'd1;
        m_reg[t] = s[15:0]; set_nz(s[15:0]); m_c = s[16];
        m_v = rt[15] && !s[15];
        return 4;
      end
      4'h7: begin m_reg[t] = {rt[15:8], ir[7:0]}; return 4; end
      4'h8: begin m_reg[t] = {ir[7:0], rt[7:0]}; return 4; end
      4'h9: begin m_reg[t] = m_mem[ra + rb]; return 4; end
      4'hA: begin m_mem[ra + rb] = rt; return 4; end
      4'hB: begin
        case (b)
          4'h0: begin r = {ra[14:0], 1'b0}; m_reg[t] = r; set_nz(r); return 4; end
          4'h1: begin r = {ra[14:0], 1'b1}; m_reg[t] = r; set_nz(r); return 4; end
          4'h2: begin r = {1'b0, ra[15:1]}; m_reg[t] = r; set_nz(r); return 4; end
          4'h3: begin r = {1'b1, ra[15:1]}; m_reg[t] = r; set_nz(r); return 4; end
          4'h4: begin r = ~ra;              m_reg[t] = r; set_nz(r); return 4; end
          4'h6: begin m_halt = 1'b1; return 2; end
          4'h7: begin m_sp = ra; return 4; end
          4'h8: begin m_sp = m_sp + 16'd1; m_pc = m_mem[m_sp]; return 4; end
          4'h9: begin m_sp = m_sp + 16'd1; m_reg[t] = m_mem[m_sp]; return 4; end
          4'hA: begin m_mem[m_sp] = rt; m_sp = m_sp - 16'd1; return 4; end
          default: return 3;  // NOP and unused codes
        endcase
      end
      4'hC: begin
        if (b <= 4'h9) begin
          c = (b <= 4'h4) ? int'(b) : int'(b) - 5;
          m_last_cond = (c != 0);
          if (!cond_ok(c)) return 3;
          m_last_taken = 1'b1;
          m_pc = (b <= 4'h4) ? m_pc + ra : ra;
          return 4;
        end else if (b == 4'hA || b == 4'hB) begin
          m_mem[m_sp] = m_pc; m_sp = m_sp - 16'd1;
          m_pc = (b == 4'hA) ? m_pc + ra : ra;
          return 4;
        end
        return 3;
      end
      4'hD: begin m_pc = m_pc + {{6{ir[9]}}, ir[9:0]}; return 4; end
      4'hE: begin
        m_last_cond = 1'b1;
        if (!cond_ok(int'(ir[11:10]) + 1)) return 3;
        m_last_taken = 1'b1;
        m_pc = m_pc + {{6{ir[9]}}, ir[9:0]};
        return 4;
      end
      default: begin  // JSRD
        m_mem[m_sp] = m_pc; m_sp = m_sp - 16'd1;
        m_pc = m_pc + {{4{ir[11]}}, ir[11:0]};
        return 4;
      end
    endcase
  endfunction

  // ---------------------------------------------------------- coverage
  int state_cnt [13];
  int n_cond_taken = 0, n_cond_not_taken = 0;
  int total_instr = 0;

  always @(posedge ck) if (!rst) state_cnt[int'(dut.u_ctrl.state)]++;

  // ---------------------------------------------------------- helpers
  task automatic load_memory();
    rst = 1'b1;
    ld_en = 1'b1;
    for (int unsigned i = 0; i < MEM_WORDS; i++) begin
      @(posedge ck);
      ld_addr = word_t'(i);
      ld_data = m_mem[i];
    end
    @(posedge ck);
    ld_en = 1'b0;
    for (int r = 0; r < 16; r++) m_reg[r] = '0;
    m_pc = '0; m_sp = '0;
    {m_n, m_z, m_c, m_v} = 4'b0000;
    m_halt = 1'b0;
  endtask

  function automatic bit arch_state_matches();
    bit ok;
    ok = (dut.u_dp.pc == m_pc) && (dut.u_dp.sp == m_sp) &&
         (dut.u_dp.flags == {m_n, m_z, m_c, m_v});
    for (int r = 0; r < 16; r++)
      if (dut.u_dp.u_regs.regs[r] != m_reg[r]) ok = 1'b0;
    return ok;
  endfunction

  task automatic compare_memory(input string name);
    int bad = 0;
    for (int unsigned i = 0; i < MEM_WORDS; i++)
      if (u_mem.mem[i] != m_mem[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d memory words differ", name, bad));
  endtask

  // Runs from reset until HALT or max_instr instructions, in lockstep.
  // Returns the total clock cycles.
  task automatic run(input string name, input int max_instr, output longint cycles,
                     output int instrs);
    @(posedge ck);
    #1 rst = 1'b0;
    lockstep(name, max_instr, cycles, instrs);
  endtask

  // Continues a program stopped by run() until HALT.
  task automatic run_more(input string name, output longint cycles, output int instrs);
    lockstep(name, 100000, cycles, instrs);
  endtask

  task automatic lockstep(input string name, input int max_instr, output longint cycles,
                          output int instrs);
    int cyc, exp_cyc;
    cycles = 0;
    instrs = 0;
    cyc = 0;
    while (instrs < max_instr) begin
      @(posedge ck);
      #1;
      cyc++;
      cycles++;
      if (dut.u_ctrl.state == S_FETCH || dut.u_ctrl.state == S_HALT) begin
        exp_cyc = ref_step();
        instrs++;
        if (m_last_cond) begin
          if (m_last_taken) n_cond_taken++; else n_cond_not_taken++;
        end
        if (dut.u_ctrl.state == S_HALT) begin
          // HALT: one fetch cycle, then S_HALT for good
          check(m_halt && exp_cyc == 2 && cyc == 1,
                $sformatf("%s: unexpected halt at %h", name, m_last_addr));
          check(arch_state_matches(), $sformatf("%s: state after HALT", name));
          cycles++;  // the S_HALT cycle itself
          break;
        end
        check(!m_halt, $sformatf("%s: reference halted at %h, processor did not",
                                 name, m_last_addr));
        check(cyc == exp_cyc, $sformatf("%s: instr %h at %h took %0d cycles, expected %0d",
                                        name, m_mem[m_last_addr], m_last_addr, cyc, exp_cyc));
        check(arch_state_matches(), $sformatf("%s: state after instr at %h (pc dut %h ref %h)",
                                              name, m_last_addr, dut.u_dp.pc, m_pc));
        if (name == "spec program") spec_point_checks();
        cyc = 0;
      end
    end
    total_instr += instrs;
  endtask

  // Values the specification's test program states in its comments
  function automatic void spec_point_checks();
    case (m_last_addr)
      16'h0006: check(dut.u_dp.u_regs.regs[4] == 16'h223C, "add R4 = 223C");
      16'h0007: check(dut.u_dp.u_regs.regs[5] == 16'hFDD4, "sub R5 = FDD4");
      16'h0008: check(dut.u_dp.u_regs.regs[6] == 16'h1000, "and R6 = 1000");
      16'h0009: check(dut.u_dp.u_regs.regs[7] == 16'h123C, "or R7 = 123C");
      16'h000A: check(dut.u_dp.u_regs.regs[8] == 16'h023C, "xor R8 = 023C");
      16'h000D: check(dut.u_dp.u_regs.regs[1] == 16'h1117, "addi R1 = 1117");
      16'h0010: check(dut.u_dp.u_regs.regs[2] == 16'h1130, "subi R2 = 1130");
      16'h0013: check(dut.u_dp.sp == 16'h01FF, "ldsp SP = 01FF");
      16'h001B: check(dut.u_dp.flags.z == 1'b1, "xor sets z");
      16'h012D: check(dut.u_dp.u_regs.regs[15] == 16'h01FF, "ld R15 = 01FF");
      16'h0131: check(dut.u_dp.u_regs.regs[2] == 16'hBAA3, "sl0/sl1 R2 = BAA3");
      16'h0135: check(dut.u_dp.u_regs.regs[4] == 16'hCBAA, "sr0/sr1 R4 = CBAA");
      16'h0136: check(dut.u_dp.u_regs.regs[1] == 16'hFFFF, "not R1 = FFFF");
      default: ;
    endcase
  endfunction

  // The specification's instruction test program, as (address, word) pairs
  localparam int unsigned PROG_LEN = 70;
  localparam logic [31:0] PROG [PROG_LEN] = '{
    32'h0000_7108, 32'h0001_8110, 32'h0002_7234, 32'h0003_8212,
    32'h0004_73DC, 32'h0005_83FE, 32'h0006_0412, 32'h0007_1512,
    32'h0008_2612, 32'h0009_3712, 32'h000A_4812, 32'h000B_5101,
    32'h000C_510F, 32'h000D_51FF, 32'h000E_6201, 32'h000F_6204,
    32'h0010_62FF, 32'h0011_7DFF, 32'h0012_8D01, 32'h0013_B0D7,
    32'h0014_7100, 32'h0015_8101, 32'h0016_C01B, 32'h0017_B005,
    32'h0018_70FF, 32'h0019_80FF, 32'h001A_50FF, 32'h001B_4000,
    32'h001C_7730, 32'h001D_8700, 32'h001E_C077, 32'h0030_7710,
    32'h0031_8700, 32'h0032_C070, 32'h0043_D050, 32'h0094_B006,
    32'h0100_B10A, 32'h0101_B20A, 32'h0102_B30A, 32'h0103_B40A,
    32'h0104_7109, 32'h0105_8100, 32'h0106_C01A, 32'h0107_B409,
    32'h0108_B309, 32'h0109_B209, 32'h010A_B109, 32'h010B_B008,
    32'h0110_4111, 32'h0111_4222, 32'h0112_4333, 32'h0113_4444,
    32'h0114_F013, 32'h0115_B008, 32'h0128_7190, 32'h0129_8101,
    32'h012A_73AA, 32'h012B_83BB, 32'h012C_AD01, 32'h012D_9F10,
    32'h012E_B230, 32'h012F_B220, 32'h0130_B221, 32'h0131_B221,
    32'h0132_B422, 32'h0133_B442, 32'h0134_B443, 32'h0135_B443,
    32'h0136_B104, 32'h0137_B008
  };

  // ---------------------------------------------------------- main
  initial begin
    longint cycles;
    int     instrs;
    word_t  w;

    // 1. the specification's test program
    for (int unsigned i = 0; i < MEM_WORDS; i++) m_mem[i] = '0;
    for (int unsigned p = 0; p < PROG_LEN; p++) m_mem[PROG[p][31:16]] = PROG[p][15:0];
    load_memory();
    run("spec program", 100000, cycles, instrs);
    $display("spec program: %0d instructions, %0d cycles, CPI %0.2f",
             instrs, cycles, real'(cycles) / real'(instrs));
    check(dut.u_ctrl.state == S_HALT, "spec program ends in HALT");
    check(dut.u_dp.pc == 16'h0095, "PC after HALT at 0094");
    check(dut.u_dp.sp == 16'h01FF, "SP back at 01FF");
    check(dut.u_dp.u_regs.regs[0] == 16'h0000 && dut.u_dp.u_regs.regs[1] == 16'h0100 &&
          dut.u_dp.u_regs.regs[2] == 16'h1130 && dut.u_dp.u_regs.regs[3] == 16'hFEDC &&
          dut.u_dp.u_regs.regs[4] == 16'h223C, "R0-R4 restored by POP");
    check(u_mem.mem[16'h0190] == 16'h01FF, "ST wrote 01FF at 0190");
    check(real'(cycles) / real'(instrs) >= 2.0 && real'(cycles) / real'(instrs) <= 4.0,
          "CPI between 2 and 4");
    // stays halted
    repeat (10) @(posedge ck);
    check(dut.u_ctrl.state == S_HALT && dut.u_dp.pc == 16'h0095, "halt holds");
    compare_memory("spec program");

    // 2. the stack example of the specification: R1 = 0300h, R2 = 0100h,
    //    LDSP R1 at address 4, JSR R2 at address 5, RTS at 0100h
    for (int unsigned i = 0; i < MEM_WORDS; i++) m_mem[i] = '0;
    m_mem[16'h0000] = 16'h7100;  // LDL R1, #00
    m_mem[16'h0001] = 16'h8103;  // LDH R1, #03
    m_mem[16'h0002] = 16'h7200;  // LDL R2, #00
    m_mem[16'h0003] = 16'h8201;  // LDH R2, #01
    m_mem[16'h0004] = 16'hB017;  // LDSP R1
    m_mem[16'h0005] = 16'hC02B;  // JSR R2
    m_mem[16'h0006] = 16'hB006;  // HALT
    m_mem[16'h0100] = 16'hB008;  // RTS
    load_memory();
    run("stack example", 6, cycles, instrs);   // up to and including JSR
    check(dut.u_dp.pc == 16'h0100 && dut.u_dp.sp == 16'h02FF && u_mem.mem[16'h0300] == 16'h0006,
          "after JSR: PC = 0100, SP = 02FF, MEM(0300) = 0006");
    run_more("stack example", cycles, instrs);
    check(dut.u_ctrl.state == S_HALT && dut.u_dp.pc == 16'h0007 && dut.u_dp.sp == 16'h0300,
          "after RTS: back at 0006, SP = 0300");
    compare_memory("stack example");

    // 3. random instruction memories
    for (int run_i = 0; run_i < RANDOM_RUNS; run_i++) begin
      for (int unsigned i = 0; i < MEM_WORDS; i++) begin
        w = word_t'($urandom);
        // three jump words in four become other instructions, so that runs
        // do not settle into short loops
        if (w[15:12] >= OPC_JREG && ($urandom % 4) != 0) w[15:12] = 4'($urandom % 12);
        if (w[15:12] == OPC_MISC && w[3:0] == 4'h6) w[3:0] = 4'h5;  // no HALT
        m_mem[i] = w;
      end
      load_memory();
      run("random", RANDOM_INSTR, cycles, instrs);
      $display("random run %0d: %0d instructions, %0d cycles", run_i, instrs, cycles);
      compare_memory("random");
    end

    // every mechanism must have happened
    for (int s = 0; s < 13; s++) begin
      $display("state %s visited %0d times", state_e'(s), state_cnt[s]);
      check(state_cnt[s] > 0, $sformatf("state %s never visited", state_e'(s)));
    end
    $display("conditional jumps taken %0d, not taken %0d", n_cond_taken, n_cond_not_taken);
    check(n_cond_taken > 0, "no conditional jump taken");
    check(n_cond_not_taken > 0, "no conditional jump not taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
